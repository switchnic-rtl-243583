// frozen_state_stage: stage 3 of the flow-state table - the late "frozen"
// indicator and the duplicated key-value pair.
//
// This stage is where an entry's fate is decided for a packet:
//  ACT_HIT, not frozen  apply the simple operation to the duplicate. If it is
//                       simple, store the new value and let the packet leave
//                       (fast path). If it needs complex processing, set the
//                       frozen flag in this same cycle, piggyback the value
//                       held before the packet and send it to the ARM cores
//                       as a write-back request.
//  ACT_HIT, frozen      no update; piggyback the frozen value again and send
//                       the packet to the ARM cores (continuous write-back).
//  ACT_INSERT           store key and piggybacked state, clear frozen.
//  ACT_DELETE           clear frozen (the ACK has arrived).
//  ACT_EXPIRE           freeze and emit a header-only write-back carrying the
//                       duplicate value (TTL eviction of an idle entry; repeats
//                       every TTL until the ACK arrives).
// Because the indicator and the copy it guards are in the same stage, the very
// next packet already sees the entry frozen. This follows the document's
// second-indicator scheme; the header-only write-back for TTL eviction is
// this design's choice.
// Timing: registered outputs, one cycle latency. After reset the frozen
// flags are wiped one entry per cycle (ENTRIES cycles, busy=1).
module frozen_state_stage
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
  output logic [STATE_W-1:0] out_val,    // duplicate value after the slot
  output logic               out_frozen, // frozen flag after the slot
  output event_t             ev,
  output logic               busy        // flag wipe after reset in progress
);
  logic               frozen_q [ENTRIES];
  logic               wiping;
  logic [IW-1:0]      wipe_idx;
  logic [FLOW_W-1:0]  dkey_q [ENTRIES];
  logic [STATE_W-1:0] dval_q [ENTRIES];

  logic [STATE_W-1:0] cur, nf_nxt, nxt, res;
  logic               cplx, drp, wr, wr_key, fz, n_fz;
  slot_t              s;
  event_t             e;

  nf_simple_op #(.NF(NF)) u_nf (
    .op(in_slot.pkt.op), .seq(in_slot.pkt.seq), .len(in_slot.pkt.len),
    .arg(in_slot.pkt.arg), .state(cur),
    .new_state(nf_nxt), .result(res), .complex_op(cplx), .drop(drp)
  );

  always_comb begin
    cur    = dval_q[in_idx];
    fz     = frozen_q[in_idx];
    n_fz   = fz;
    nxt    = nf_nxt;
    wr     = 1'b0;
    wr_key = 1'b0;
    s      = in_slot;
    e      = '0;
    if (in_slot.valid) begin
      unique case (in_slot.act)
        ACT_HIT: begin
          if (fz) begin
            s.to_arm = 1'b1; s.wb = 1'b1; s.pb_state = cur;
            e.wb_repeat = 1'b1;
          end else if (cplx) begin
            n_fz = 1'b1;
            s.to_arm = 1'b1; s.wb = 1'b1; s.pb_state = cur;
            e.freeze = 1'b1;
          end else begin
            wr = 1'b1;
            s.pkt.arg = res;
            s.drop    = drp;
            e.fast_hit = 1'b1;
          end
        end
        ACT_INSERT: begin
          wr = 1'b1; wr_key = 1'b1; nxt = in_slot.pkt.hdr.state; n_fz = 1'b0;
        end
        ACT_DELETE: n_fz = 1'b0;
        ACT_EXPIRE: begin
          n_fz = 1'b1;
          s.drop = 1'b0; s.to_arm = 1'b1; s.wb = 1'b1; s.pb_state = cur;
          s.pkt.flow_id   = dkey_q[in_idx];
          s.pkt.ctrl_only = 1'b1;
          s.pkt.seq = '0; s.pkt.len = '0; s.pkt.op = OP_DATA; s.pkt.arg = '0;
          e.freeze = !fz;
          e.wb_repeat = fz;
        end
        default: ;
      endcase
    end
  end

  // After reset the frozen flags are cleared one entry per cycle (busy=1).
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wiping   <= 1'b1;
      wipe_idx <= '0;
    end else if (wiping) begin
      wipe_idx <= wipe_idx + 1'b1;
      if (wipe_idx == IW'(ENTRIES - 1)) wiping <= 1'b0;
    end
  end

  assign busy = wiping;

  always_ff @(posedge clk) begin
    if (wiping)             frozen_q[wipe_idx] <= 1'b0;
    else if (in_slot.valid) frozen_q[in_idx]   <= n_fz;
  end

  always_ff @(posedge clk) begin
    if (wr)     dval_q[in_idx] <= nxt;
    if (wr_key) dkey_q[in_idx] <= in_slot.pkt.flow_id;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_slot   <= '0;
      out_idx    <= '0;
      out_val    <= '0;
      out_frozen <= 1'b0;
      ev         <= '0;
    end else begin
      out_slot   <= s;
      out_idx    <= in_idx;
      out_val    <= wr ? nxt : cur;
      out_frozen <= n_fz;
      ev         <= e;
    end
  end

  // A fast-path packet must find the duplicate under its own key.
  assert property (@(posedge clk) disable iff (!rst_n)
    (in_slot.valid && in_slot.act == ACT_HIT) |-> dkey_q[in_idx] == in_slot.pkt.flow_id);
endmodule
