// tb_switchnic_dataplane: end-to-end test of the switch data plane at its
// default size (32768 entries, reassembler NF) together with a behavioural
// model of the ARM cores.
//
// Traffic: heavy TCP flows with occasional swapped packet pairs (out of
// order), two flows that hash to the same entry, a short "cold" flow that
// never reaches the heavy-hitter threshold, and a flow whose state requests
// the cores never answer. On the link to the cores some write-back packets are
// lost; lost data packets are sent again by the source later.
// Checks:
//  - every packet leaves towards the network exactly once and, per flow, in
//    sequence order (the reassembler's promise, which breaks on stale state);
//  - packets served by the fast path leave exactly 5 cycles after entry;
//  - after the traffic and the TTL eviction of every entry, the cores hold,
//    for every flow, the byte count the source sent (no update was lost or
//    applied to a stale copy);
//  - every protocol mechanism occurred at least once.
module tb_switchnic_dataplane;
  import switchnic_pkg::*;

  localparam int NHEAVY     = 14;
  localparam int NFLOWS     = NHEAVY + 4;   // + 2 colliding, 1 cold, 1 declined
  localparam int PKTS_HEAVY = 160;
  localparam int THRESH     = 4;
  localparam int FAST_LAT   = 5;
  localparam int ENTRIES    = 32768;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cfg_t   cfg;
  logic   net_in_valid, net_in_ready, arm_in_valid, arm_in_ready;
  pkt_t   net_in_pkt, arm_in_pkt, net_out_pkt, arm_out_pkt;
  logic   net_out_valid, arm_out_valid, init_busy;
  event_t ev;
  logic   link_valid;
  pkt_t   link_pkt;
  logic [FLOW_W-1:0] decline_flow;

  switchnic_dataplane u_dut (
    .clk, .rst_n, .cfg, .cms_clear(1'b0), .sweep_en(1'b1),
    .net_in_valid, .net_in_ready, .net_in_pkt,
    .arm_in_valid, .arm_in_ready, .arm_in_pkt,
    .net_out_valid, .net_out_pkt, .arm_out_valid, .arm_out_pkt,
    .ev, .init_busy
  );

  arm_core_model #(.IN_DELAY(20), .OUT_DELAY(20)) u_arm (
    .clk, .rst_n, .in_valid(link_valid), .in_pkt(link_pkt),
    .out_valid(arm_in_valid), .out_ready(arm_in_ready), .out_pkt(arm_in_pkt),
    .decline_flow
  );

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // Reference of the table hash, written from its definition.
  function automatic int ref_idx(logic [31:0] k);
    logic [31:0] m;
    logic [63:0] p;
    m = k ^ (k >> 16);
    p = {32'd0, m} * 64'h9E37_79B1;
    return int'(p[31:17]);
  endfunction

  // ---- flows ---------------------------------------------------------------
  logic [FLOW_W-1:0] fid   [NFLOWS];
  logic [31:0]       isn   [NFLOWS];
  logic [31:0]       snd   [NFLOWS];   // next sequence number to generate
  int                left  [NFLOWS];
  logic [31:0]       expo  [NFLOWS];   // next sequence number expected out
  int                fidx  [logic [FLOW_W-1:0]];
  pkt_t              held  [NFLOWS][$]; // swapped packet waiting to be sent
  int                sent_pkts = 0, out_pkts = 0, ooo_swaps = 0;

  typedef struct {
    pkt_t   p;
    longint t;
  } rtx_t;
  rtx_t rtxq[$];
  int   n_lost_data = 0, n_lost_ctrl = 0, n_rtx = 0;

  longint entry_t  [longint];
  bit     went_arm [longint];
  int     n_fast_checked = 0;

  function automatic longint key_of(pkt_t p);
    return {p.flow_id, p.seq};
  endfunction

  function automatic pkt_t mk(int f);
    pkt_t p;
    p         = '0;
    p.flow_id = fid[f];
    p.seq     = snd[f];
    p.len     = 16'(64 + ($urandom % 1400));
    p.op      = OP_DATA;
    snd[f]    = snd[f] + 32'(p.len);
    left[f]--;
    return p;
  endfunction

  // Pick the next packet to offer, if any.
  function automatic bit next_pkt(output pkt_t p);
    int f, tries;
    if (rtxq.size() > 0 && rtxq[0].t <= cyc) begin
      rtx_t r;
      r = rtxq.pop_front();
      p = r.p;
      n_rtx++;
      return 1'b1;
    end
    for (tries = 0; tries < 8; tries++) begin
      f = $urandom % NFLOWS;
      if (held[f].size() > 0) begin
        p = held[f].pop_front();
        return 1'b1;
      end
      if (left[f] > 0) begin
        if (left[f] >= 3 && snd[f] != isn[f] && ($urandom % 30) == 0 && f < NHEAVY + 2) begin
          pkt_t a;
          a = mk(f);
          p = mk(f);
          held[f].push_back(a);
          ooo_swaps++;
        end else begin
          p = mk(f);
        end
        return 1'b1;
      end
    end
    return 1'b0;
  endfunction

  function automatic bit traffic_done();
    foreach (left[f]) if (left[f] > 0 || held[f].size() > 0) return 1'b0;
    return rtxq.size() == 0;
  endfunction

  // ---- source --------------------------------------------------------------
  bit   gen_on = 1'b0;
  pkt_t cur;
  bit   have = 1'b0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (net_in_valid && net_in_ready) begin
        entry_t[key_of(net_in_pkt)] = cyc;
        sent_pkts++;
        have = 1'b0;
      end
      if (!have && gen_on && ($urandom % 100) < 30) have = next_pkt(cur);
      net_in_valid <= have;
      net_in_pkt   <= have ? cur : '0;
    end else begin
      net_in_valid <= 1'b0;
      net_in_pkt   <= '0;
    end
  end

  // ---- link to the cores, with loss of some write-back packets ---------------
  always @(posedge clk) begin
    link_valid <= 1'b0;
    link_pkt   <= '0;
    if (rst_n && arm_out_valid) begin
      if (!arm_out_pkt.ctrl_only) went_arm[key_of(arm_out_pkt)] = 1'b1;
      if (arm_out_pkt.hdr.flags.wb && ($urandom % 12) == 0) begin
        if (arm_out_pkt.ctrl_only) n_lost_ctrl++;
        else begin
          rtx_t r;
          r.p     = arm_out_pkt;
          r.p.hdr = '0;
          r.t     = cyc + 300 + longint'($urandom % 500);
          rtxq.push_back(r);
          n_lost_data++;
        end
      end else begin
        link_valid <= 1'b1;
        link_pkt   <= arm_out_pkt;
      end
    end
  end

  // ---- sink: order and latency -----------------------------------------------
  always @(posedge clk) begin
    if (rst_n && net_out_valid) begin
      int f;
      longint k;
      out_pkts++;
      check(fidx.exists(net_out_pkt.flow_id), "packet of unknown flow left");
      f = fidx[net_out_pkt.flow_id];
      check(net_out_pkt.seq == expo[f],
            $sformatf("flow %0d out of order: seq %0d expected %0d", f, net_out_pkt.seq, expo[f]));
      expo[f] = net_out_pkt.seq + 32'(net_out_pkt.len);
      check(net_out_pkt.hdr == '0, "in-band header not stripped");
      k = key_of(net_out_pkt);
      if (!went_arm.exists(k)) begin
        check(entry_t.exists(k) && (cyc - entry_t[k]) == longint'(FAST_LAT),
              $sformatf("fast-path latency %0d", cyc - entry_t[k]));
        n_fast_checked++;
      end
    end
  end

  // ---- mechanism counters ------------------------------------------------------
  int c_fast, c_miss, c_coll, c_cold, c_req, c_cancel, c_acc, c_disc, c_tmo, c_frz,
      c_wbr, c_ack, c_rst, c_ttl;
  always @(posedge clk) if (rst_n) begin
    c_fast   += int'(ev.fast_hit);
    c_miss   += int'(ev.miss);
    c_coll   += int'(ev.collision);
    c_cold   += int'(ev.cold);
    c_req    += int'(ev.state_req);
    c_cancel += int'(ev.cancel);
    c_acc    += int'(ev.resp_accept);
    c_disc   += int'(ev.resp_discard);
    c_tmo    += int'(ev.timeout);
    c_frz    += int'(ev.freeze);
    c_wbr    += int'(ev.wb_repeat);
    c_ack    += int'(ev.ack_delete);
    c_rst    += int'(ev.reset);
    c_ttl    += int'(ev.ttl_expire);
  end

  task automatic need(int n, string what);
    check(n > 0, {"mechanism never happened: ", what});
    $display("  %-34s %0d", what, n);
  endtask

  // ---- watchdog -----------------------------------------------------------------
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- main -----------------------------------------------------------------------
  initial begin
    int a, b;
    longint t0;
    cfg.hh_threshold = 16'(THRESH);
    cfg.ttl          = 32'd3000;
    cfg.timeout      = 32'd1000;
    cfg.reset_delay  = 32'd400;
    c_fast = 0; c_miss = 0; c_coll = 0; c_cold = 0; c_req = 0; c_cancel = 0; c_acc = 0;
    c_disc = 0; c_tmo = 0; c_frz = 0; c_wbr = 0; c_ack = 0; c_rst = 0; c_ttl = 0;

    // Flow IDs: heavy flows at random, then two that share a table entry.
    for (int f = 0; f < NFLOWS; f++) begin
      do fid[f] = $urandom; while (fidx.exists(fid[f]));
      if (f == NHEAVY + 1) begin
        logic [31:0] c;
        c = fid[NHEAVY] + 1;
        while (ref_idx(c) != ref_idx(fid[NHEAVY])) c++;
        fid[f] = c;
      end
      fidx[fid[f]] = f;
      isn[f]  = $urandom;
      snd[f]  = isn[f];
      expo[f] = isn[f];
      left[f] = (f < NHEAVY + 2) ? PKTS_HEAVY : (f == NHEAVY + 2) ? THRESH : THRESH + 1;
    end
    decline_flow = fid[NHEAVY + 3];

    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    while (init_busy) @(posedge clk);
    @(posedge clk);
    gen_on = 1'b1;
    while (!(traffic_done() && !have && !net_in_valid)) @(posedge clk);
    $display("traffic sent at cycle %0d: %0d packets", cyc, sent_pkts);

    // Idle: let every entry time out through TTL eviction and be freed.
    t0 = cyc;
    repeat (250_000) @(posedge clk);
    check(u_arm.pending() == 0, "cores still busy after drain");

    a = 0;
    for (int f = 0; f < NFLOWS; f++) begin
      check(expo[f] == snd[f], $sformatf("flow %0d: released up to %0d, sent up to %0d", f, expo[f], snd[f]));
      check(u_arm.state_of(fid[f]) == snd[f],
            $sformatf("flow %0d: cores hold %0d, expected %0d", f, u_arm.state_of(fid[f]), snd[f]));
      check(u_arm.buffered_of(fid[f]) == 0, "packets left in the reassembly buffer");
      a += (f < NHEAVY + 2) ? PKTS_HEAVY : (f == NHEAVY + 2) ? THRESH : THRESH + 1;
    end
    check(out_pkts == a, $sformatf("%0d packets delivered, %0d generated", out_pkts, a));
    b = 0;
    for (int i = 0; i < ENTRIES; i++) b += int'(u_dut.u_s1.flags_q[i].valid);
    check(b == 0, $sformatf("%0d table entries still in use", b));

    $display("mechanisms:");
    need(c_fast, "fast path (switch-only update)");
    need(n_fast_checked, "fast-path latency checked");
    need(c_miss, "miss on inactive entry");
    need(c_coll, "hash collision");
    need(c_cold, "cold flow (below threshold)");
    need(c_req, "state request (pull)");
    need(c_cancel, "pull cancelled by concurrent packet");
    need(c_acc, "state response inserted");
    need(c_disc, "stale response discarded");
    need(c_tmo, "pull timeout");
    need(c_frz, "freeze for complex processing");
    need(c_wbr, "continuous write-back");
    need(c_ack, "ACK deletes frozen entry");
    need(c_rst, "inactive entry reset");
    need(c_ttl, "TTL eviction");
    need(ooo_swaps, "out-of-order packets sent");
    need(n_lost_data, "lost write-back data packet");
    need(n_lost_ctrl, "lost header-only write-back");
    need(u_arm.n_wb_ignored, "redundant write-back ignored");
    need(u_arm.n_declined, "request declined by cores");
    need(u_arm.n_standalone_ack, "header-only ACK");
    $display("packets in %0d, out %0d, retransmitted %0d", sent_pkts, out_pkts, n_rtx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
