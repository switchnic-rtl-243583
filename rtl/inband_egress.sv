// inband_egress: last pipeline stage - writes the in-band header and steers
// each packet to the ARM cores, to the network, or nowhere.
//
// To the ARM cores: the header gets req and wb as decided upstream; when wb is
// set the piggybacked state field carries the frozen value, otherwise it is
// zero. resp and ack are flags only the ARM cores set, so they leave cleared.
// To the network: the in-band header is stripped (all zero). Header-only
// messages (ctrl_only), slots marked drop (firewall deny, maintenance slots)
// and empty slots produce nothing. Outputs are registered: one cycle latency,
// one packet per cycle, no backpressure (the egress queues are outside this
// design). Header carriage of state follows the document; field layout and
// steering rules are this design's.
module inband_egress
  import switchnic_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  slot_t in_slot,
  output logic  net_valid,
  output pkt_t  net_pkt,
  output logic  arm_valid,
  output pkt_t  arm_pkt
);
  pkt_t p_arm, p_net;
  logic go_arm, go_net;

  always_comb begin
    p_arm = in_slot.pkt;
    p_arm.hdr.flags.req  = in_slot.req;
    p_arm.hdr.flags.wb   = in_slot.wb;
    p_arm.hdr.flags.resp = 1'b0;
    p_arm.hdr.flags.ack  = 1'b0;
    p_arm.hdr.state      = in_slot.wb ? in_slot.pb_state : '0;

    p_net     = in_slot.pkt;
    p_net.hdr = '0;

    go_arm = in_slot.valid && in_slot.to_arm && !in_slot.drop;
    go_net = in_slot.valid && !in_slot.to_arm && !in_slot.drop && !in_slot.pkt.ctrl_only;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      net_valid <= 1'b0;
      arm_valid <= 1'b0;
      net_pkt   <= '0;
      arm_pkt   <= '0;
    end else begin
      net_valid <= go_net;
      arm_valid <= go_arm;
      net_pkt   <= go_net ? p_net : '0;
      arm_pkt   <= go_arm ? p_arm : '0;
    end
  end
endmodule
