// nf_simple_op: the "simple" part of a network function, evaluated in the
// switch on one cached state value (what a stateful ALU does in one pass).
//
// It either produces the next state value and a result for the packet, or
// reports complex=1 when the packet needs the ARM cores; a complex packet
// leaves the state untouched here. Combinational.
//   NF_REASSEMBLER  state = next expected TCP byte. seq == state: in order,
//                   state += len. Any other seq (early or late) or an
//                   OP_COMPLEX packet: complex (buffering is done by the cores).
//   NF_KVSTORE      state = value. OP_READ returns it in result, OP_WRITE
//                   stores arg and returns it.
//   NF_LOADBAL      state = backend; result = state, state unchanged.
//   NF_FIREWALL     state[0] = connection allowed; drop when it is 0.
// In every NF an OP_COMPLEX packet is complex. The NF list and their
// simple/complex split follow the document's benchmark functions; the exact
// encodings of state and result are this design's choice.
module nf_simple_op
  import switchnic_pkg::*;
#(
  parameter nf_kind_e NF = NF_REASSEMBLER
) (
  input  nf_op_e             op,
  input  logic [SEQ_W-1:0]   seq,
  input  logic [LEN_W-1:0]   len,
  input  logic [STATE_W-1:0] arg,
  input  logic [STATE_W-1:0] state,
  output logic [STATE_W-1:0] new_state,
  output logic [STATE_W-1:0] result,
  output logic               complex_op,
  output logic               drop
);
  always_comb begin
    new_state  = state;
    result     = state;
    complex_op = (op == OP_COMPLEX);
    drop       = 1'b0;
    if (!complex_op) begin
      unique case (NF)
        NF_REASSEMBLER: begin
          if (STATE_W'(seq) == state) new_state = state + STATE_W'(len);
          else                        complex_op = 1'b1;
          result = new_state;
        end
        NF_KVSTORE: begin
          if (op == OP_WRITE) begin
            new_state = arg;
            result    = arg;
          end
        end
        NF_LOADBAL:  result = state;
        NF_FIREWALL: drop = !state[0];
        default: ;
      endcase
    end
  end
endmodule
