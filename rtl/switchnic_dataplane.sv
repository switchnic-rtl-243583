// switchnic_dataplane: the SwitchNIC switch data plane.
//
// A stateful network function is split between this pipeline (fast path,
// simple per-packet state updates) and ARM cores next to the switch (slow
// path, anything complex). Flow state lives in exactly one place at a time;
// the switch alone tracks where, and every hand-over of a flow's state rides
// on a packet of that flow in an in-band header, so neither side ever updates
// a copy the other still uses.
//
// Pipeline (one slot per cycle, five register stages):
//   ingress_arbiter  ARM returns > network > sweep slots
//   S0  flow_hash + count_min_sketch   table index, heavy-hitter bit
//   S1  ctrl_stage       key, valid/incomplete/active/inactive flags, timestamp
//   S2  orig_state_stage original state value
//   S3  frozen_state_stage  frozen flag + duplicated key/value, NF simple op
//   S4  inband_egress    header write, steering to network / ARM / drop
// A network packet is accepted in cycle 0 and appears on net_out or arm_out
// after 5 clock edges. There is no backpressure on the outputs; net_in is
// stalled (net_in_ready=0) while a packet from the ARM cores is taken, and
// both inputs are stalled for TABLE_ENTRIES cycles after reset while the
// table flags are wiped (init_busy=1). A sketch clear does not stall.
//
// Per-entry life cycle: initial -> (state request on a heavy flow's packet)
// incomplete -> (response, no packet in between) active -> (packet needing
// complex processing) frozen -> (ACK from the cores) inactive -> (reset
// delay) initial. incomplete -> inactive on a concurrent packet or timeout;
// an active entry idle for cfg.ttl is frozen and written back.
// The protocol, the two-indicator freeze, the continuous write-back and the
// count-min admission follow the document. Widths, the hash, the sweep-based
// timers and the pipeline arrangement are this design's choices. Defaults:
// 32768 table entries, a packet-reassembler NF.
// Lint notes: the sketch's estimate and busy flag, and the stage-3 index and
// frozen flag, are sub-block outputs this level does not need (a sketch
// clear deliberately does not stall traffic); they are left unconnected or
// unused on purpose.
module switchnic_dataplane
  import switchnic_pkg::*;
#(
  parameter nf_kind_e NF            = NF_REASSEMBLER,
  parameter int       TABLE_ENTRIES = 32768,
  parameter int       CMS_ROWS      = 2,
  parameter int       CMS_COLS      = 4096,
  parameter int       CMS_CTR_W     = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  cfg_t   cfg,
  input  logic   cms_clear,
  input  logic   sweep_en,
  // from the network
  input  logic   net_in_valid,
  output logic   net_in_ready,
  input  pkt_t   net_in_pkt,
  // back from the ARM cores
  input  logic   arm_in_valid,
  output logic   arm_in_ready,
  input  pkt_t   arm_in_pkt,
  // to the network
  output logic   net_out_valid,
  output pkt_t   net_out_pkt,
  // to the ARM cores
  output logic   arm_out_valid,
  output pkt_t   arm_out_pkt,
  output event_t ev,
  output logic   init_busy  // table flags being wiped after reset; inputs stalled
);
  localparam int IW = $clog2(TABLE_ENTRIES);

  logic            sw_valid, sw_ready;
  logic [IW-1:0]   sw_idx;
  logic [TS_W-1:0] now;
  slot_t           a_slot;
  logic [IW-1:0]   h_idx;

  // While the tables are wiped after reset nothing enters the pipeline.
  logic s1_busy, s3_busy, arb_arm_ready, arb_net_ready;
  assign init_busy    = s1_busy || s3_busy;
  assign arm_in_ready = arb_arm_ready && !init_busy;
  assign net_in_ready = arb_net_ready && !init_busy;

  ttl_sweeper #(.ENTRIES(TABLE_ENTRIES)) u_sweep (
    .clk, .rst_n, .enable(sweep_en && !init_busy), .valid(sw_valid), .ready(sw_ready), .idx(sw_idx), .now
  );

  ingress_arbiter u_arb (
    .arm_valid(arm_in_valid && !init_busy), .arm_ready(arb_arm_ready), .arm_pkt(arm_in_pkt),
    .net_valid(net_in_valid && !init_busy), .net_ready(arb_net_ready), .net_pkt(net_in_pkt),
    .sweep_valid(sw_valid), .sweep_ready(sw_ready), .slot(a_slot)
  );

  // ---- S0: index and frequency --------------------------------------------
  flow_hash #(.KEY_W(FLOW_W), .OUT_W(IW)) u_hash (.key(a_slot.pkt.flow_id), .idx(h_idx));

  slot_t         s0;
  logic [IW-1:0] s0_idx;
  logic          heavy;
  logic [CMS_CTR_W-1:0] est;

  count_min_sketch #(.KEY_W(FLOW_W), .ROWS(CMS_ROWS), .COLS(CMS_COLS), .CTR_W(CMS_CTR_W)) u_cms (
    .clk, .rst_n, .clear(cms_clear),
    .upd(a_slot.valid && a_slot.src == SRC_NET), .key(a_slot.pkt.flow_id),
    .threshold(CMS_CTR_W'(cfg.hh_threshold)), .est, .heavy, .busy()
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s0     <= '0;
      s0_idx <= '0;
    end else begin
      s0     <= a_slot;
      s0_idx <= (a_slot.src == SRC_SWEEP) ? sw_idx : h_idx;
    end
  end

  slot_t s0h;
  always_comb begin
    s0h       = s0;
    s0h.heavy = heavy;
  end

  // ---- S1..S3: the state table ---------------------------------------------
  slot_t              s1, s2, s3;
  logic [IW-1:0]      s1_idx, s2_idx, s3_idx;
  event_t             ev1, ev3;
  logic [STATE_W-1:0] orig_val, dup_val;
  logic               dup_frozen;

  ctrl_stage #(.ENTRIES(TABLE_ENTRIES)) u_s1 (
    .clk, .rst_n, .cfg, .now, .in_slot(s0h), .in_idx(s0_idx),
    .out_slot(s1), .out_idx(s1_idx), .ev(ev1), .busy(s1_busy)
  );

  orig_state_stage #(.NF(NF), .ENTRIES(TABLE_ENTRIES)) u_s2 (
    .clk, .rst_n, .in_slot(s1), .in_idx(s1_idx),
    .out_slot(s2), .out_idx(s2_idx), .out_val(orig_val)
  );

  frozen_state_stage #(.NF(NF), .ENTRIES(TABLE_ENTRIES)) u_s3 (
    .clk, .rst_n, .in_slot(s2), .in_idx(s2_idx),
    .out_slot(s3), .out_idx(s3_idx), .out_val(dup_val), .out_frozen(dup_frozen), .ev(ev3), .busy(s3_busy)
  );

  // ---- S4: in-band header and steering --------------------------------------
  inband_egress u_eg (
    .clk, .rst_n, .in_slot(s3),
    .net_valid(net_out_valid), .net_pkt(net_out_pkt),
    .arm_valid(arm_out_valid), .arm_pkt(arm_out_pkt)
  );

  // Events of stage 1 and stage 3 belong to different slots; both are pulses.
  always_ff @(posedge clk) begin
    if (!rst_n) ev <= '0;
    else        ev <= ev1 | ev3;
  end

  // Consistency of the two copies: a fast-path update leaves the original and
  // the duplicate equal (the original may only diverge while frozen).
  logic [STATE_W-1:0] orig_val_d;
  always_ff @(posedge clk) orig_val_d <= orig_val;

  assert property (@(posedge clk) disable iff (!rst_n)
    ev3.fast_hit |-> (dup_val == orig_val_d));
endmodule
