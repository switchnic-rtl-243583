// flow_hash: maps a flow ID to an index into the state table or a sketch row.
//
// Multiplicative (Fibonacci) hashing: the key is multiplied by an odd 32-bit
// constant and the top OUT_W bits of the 32-bit product are the index, so every
// key bit influences the index and different SEEDs give independent-looking
// functions for the rows of the count-min sketch. The document only says that
// the table is a hash table and that hash units limit its size; the function
// itself is this design's choice. Purely combinational.
module flow_hash #(
  parameter int          KEY_W = 32,
  parameter int          OUT_W = 15,
  parameter logic [31:0] SEED  = 32'h9E37_79B1
) (
  input  logic [KEY_W-1:0] key,
  output logic [OUT_W-1:0] idx
);
  logic [31:0] folded, mixed;
  logic [63:0] prod;

  // Fold wider keys down to 32 bits before the multiply.
  always_comb begin
    folded = '0;
    for (int i = 0; i < KEY_W; i++) folded[i % 32] = folded[i % 32] ^ key[i];
    mixed  = folded ^ (folded >> 16);
    prod   = {32'd0, mixed} * {32'd0, SEED};
  end

  assign idx = prod[31 -: OUT_W];
endmodule
