// tb_orig_state_stage: random slots on an 8-entry stage with the
// reassembler NF against a reference value array: inserts store the
// piggybacked state, in-order hits advance it by the packet length, other hits
// (out of order or marked complex) and other actions leave it alone; the slot
// passes through unchanged with one cycle of latency.
module tb_orig_state_stage;
  import switchnic_pkg::*;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  slot_t in_s, out_s;
  logic [2:0] in_i, out_i;
  logic [31:0] oval;
  always #5 clk = ~clk;

  orig_state_stage #(.NF(NF_REASSEMBLER), .ENTRIES(N)) dut (
    .clk, .rst_n, .in_slot(in_s), .in_idx(in_i), .out_slot(out_s), .out_idx(out_i), .out_val(oval));

  logic [31:0] val [N];
  bit          ins [N];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    slot_t q;
    int i, n_upd = 0, n_keep = 0;
    in_s = '0; in_i = '0;
    @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      i = $urandom % N;
      q = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      q.valid = ($urandom % 10 != 0);
      q.pkt.op = ($urandom % 8 == 0) ? OP_COMPLEX : OP_DATA;
      q.act = !ins[i] ? ACT_INSERT : act_e'($urandom % 5);
      if ($urandom % 3 != 0) q.act = ins[i] ? ACT_HIT : ACT_INSERT;
      q.pkt.seq = ($urandom % 4 == 0) ? $urandom : val[i];
      if (q.valid && q.act == ACT_INSERT) begin val[i] = q.pkt.hdr.state; ins[i] = 1; end
      else if (q.valid && q.act == ACT_HIT && q.pkt.op == OP_DATA && q.pkt.seq == val[i]) begin
        val[i] = val[i] + 32'(q.pkt.len); n_upd++;
      end else if (q.valid && q.act == ACT_HIT) n_keep++;
      in_s = q; in_i = 3'(i);
      @(posedge clk); #1;
      checks++;
      if (out_s != q || out_i != 3'(i) || (ins[i] && oval != val[i])) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d act=%0d: val=%h exp %h", t, q.act, oval, val[i]);
      end
    end
    checks++; if (n_upd == 0 || n_keep == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
