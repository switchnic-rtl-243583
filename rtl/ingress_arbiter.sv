// ingress_arbiter: merges the three sources of pipeline slots into one.
//
// Fixed priority, one slot per cycle: packets returning from the ARM cores
// first (they complete migrations and free entries), then packets from the
// network, then table-maintenance (sweep) slots, which therefore only use
// otherwise idle cycles. Network packets enter with their in-band header
// cleared, so only the ARM cores can present request/response/ACK flags.
// Combinational valid/ready handshake: a source's word is taken in the cycle
// where its valid and ready are both high. The document only says that both
// kinds of traffic pass the switch pipeline; the priority order is this
// design's choice.
module ingress_arbiter
  import switchnic_pkg::*;
(
  input  logic  arm_valid,
  output logic  arm_ready,
  input  pkt_t  arm_pkt,
  input  logic  net_valid,
  output logic  net_ready,
  input  pkt_t  net_pkt,
  input  logic  sweep_valid,
  output logic  sweep_ready,
  output slot_t slot
);
  always_comb begin
    arm_ready   = 1'b1;
    net_ready   = !arm_valid;
    sweep_ready = !arm_valid && !net_valid;
    slot        = '0;
    slot.src    = SRC_NONE;
    slot.act    = ACT_NONE;
    if (arm_valid) begin
      slot.valid = 1'b1;
      slot.src   = SRC_ARM;
      slot.pkt   = arm_pkt;
    end else if (net_valid) begin
      slot.valid   = 1'b1;
      slot.src     = SRC_NET;
      slot.pkt     = net_pkt;
      slot.pkt.hdr = '0;
    end else if (sweep_valid) begin
      slot.valid = 1'b1;
      slot.src   = SRC_SWEEP;
    end
  end
endmodule
