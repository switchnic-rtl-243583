// orig_state_stage: stage 2 of the flow-state table - the original state value.
//
// Holds one STATE_W value per entry (its key lives in stage 1). On ACT_INSERT
// it stores the state piggybacked by the ARM cores; on ACT_HIT it applies the
// network function's simple operation and writes the new value back unless the
// packet turns out to need complex processing. This copy sits before the
// frozen indicator, so a packet that follows a freezing packet may still
// update it; that is harmless because stage 3 then forwards the packet with
// the duplicate, and the whole entry is rewritten on the next insert.
// The orig/duplicate split follows the document; the rest is this design's.
// Timing: output slot/index/value registered, one cycle latency. out_val is
// the value this stage holds for the entry after the slot (for checking).
// The NF result and drop outputs are not used here: stage 3 acts on them.
module orig_state_stage
  import switchnic_pkg::*;
#(
  parameter nf_kind_e NF      = NF_REASSEMBLER,
  parameter int       ENTRIES = 32768,
  parameter int       IW      = $clog2(ENTRIES)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  slot_t              in_slot,
  input  logic [IW-1:0]      in_idx,
  output slot_t              out_slot,
  output logic [IW-1:0]      out_idx,
  output logic [STATE_W-1:0] out_val
);
  logic [STATE_W-1:0] val_q [ENTRIES];
  logic [STATE_W-1:0] cur, nf_nxt, nxt, res;
  logic               cplx, drp, wr;

  nf_simple_op #(.NF(NF)) u_nf (
    .op(in_slot.pkt.op), .seq(in_slot.pkt.seq), .len(in_slot.pkt.len),
    .arg(in_slot.pkt.arg), .state(cur),
    .new_state(nf_nxt), .result(res), .complex_op(cplx), .drop(drp)
  );

  always_comb begin
    cur = val_q[in_idx];
    wr  = 1'b0;
    nxt = nf_nxt;
    if (in_slot.valid) begin
      unique case (in_slot.act)
        ACT_INSERT: begin wr = 1'b1; nxt = in_slot.pkt.hdr.state; end
        ACT_HIT:    wr = !cplx;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (wr) val_q[in_idx] <= nxt;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_slot <= '0;
      out_idx  <= '0;
      out_val  <= '0;
    end else begin
      out_slot <= in_slot;
      out_idx  <= in_idx;
      out_val  <= wr ? nxt : cur;
    end
  end
endmodule
