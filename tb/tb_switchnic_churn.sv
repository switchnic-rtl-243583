// tb_switchnic_churn: load-balancer workload with flow churn on the switch
// data plane (NF = NF_LOADBAL, default table of 32768 entries).
//
// Workload: connections start and end all the time. At any moment about
// LIVE connections are open, and the traffic is skewed: half of the packets
// go to 32 of the open connections. A connection sends between 4 and
// 4 + L packets, then it is closed and a new one takes its place. Two churn
// rates are run: L = 400 (slow) and L = 12 (fast).
// The cores are modelled here. Each packet takes 20 cycles to reach them and
// 20 cycles to come back. The first packet of an unknown connection picks a
// backend at random (the complex part of a load balancer). Later packets
// reuse that backend. The model imports the first write-back of each freeze,
// ACKs every write-back and answers every state request with the backend.
// Checks:
//  - every packet leaves exactly once;
//  - every packet of a connection reports the same backend, whether the
//    switch or the cores served it. A lost or stale mapping would break
//    connection affinity;
//  - the switch serves a fair share of the packets at the slow churn rate;
//  - the mechanisms that churn exercises occurred: pulls, inserts, TTL
//    eviction and resets of freed entries.
// Connection lengths, the skew and the delays are this testbench's choices.
module tb_switchnic_churn;
  import switchnic_pkg::*;

  localparam int LIVE    = 2000;
  localparam int ENTRIES = 32768;
  localparam int DLY     = 20;
  localparam int NBACK   = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cfg_t   cfg;
  logic   net_in_valid, net_in_ready, arm_in_valid, arm_in_ready;
  pkt_t   net_in_pkt, arm_in_pkt, net_out_pkt, arm_out_pkt;
  logic   net_out_valid, arm_out_valid, init_busy;
  event_t ev;

  switchnic_dataplane #(.NF(NF_LOADBAL)) u_dut (
    .clk, .rst_n, .cfg, .cms_clear(1'b0), .sweep_en(1'b1),
    .net_in_valid, .net_in_ready, .net_in_pkt,
    .arm_in_valid, .arm_in_ready, .arm_in_pkt,
    .net_out_valid, .net_out_pkt, .arm_out_valid, .arm_out_pkt,
    .ev, .init_busy
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

  // ---- model of the cores -----------------------------------------------------
  typedef struct {
    pkt_t   p;
    longint t;
  } item_t;
  item_t inq[$], outq[$];
  logic [STATE_W-1:0] cval [logic [FLOW_W-1:0]];
  bit                 cwb  [logic [FLOW_W-1:0]];
  int n_wb_applied = 0, n_new_conn = 0;

  function automatic void core_process(pkt_t p);
    logic [FLOW_W-1:0] k;
    pkt_t  r;
    item_t it;
    k = p.flow_id;
    if (!cval.exists(k)) begin
      cval[k] = STATE_W'($urandom % NBACK);
      cwb[k]  = 1'b1;
      n_new_conn++;
    end
    r = p;
    r.hdr = '0;
    if (p.hdr.flags.wb) begin
      if (!cwb[k]) begin
        cval[k] = p.hdr.state;
        cwb[k]  = 1'b1;
        n_wb_applied++;
      end
      r.hdr.flags.ack = 1'b1;
    end
    if (!p.ctrl_only) begin
      r.arg = cval[k];
      if (p.hdr.flags.req) begin
        r.hdr.flags.resp = 1'b1;
        r.hdr.state      = cval[k];
        cwb[k]           = 1'b0;
      end
    end
    if (!p.ctrl_only || p.hdr.flags.wb) begin
      it.p = r;
      it.t = cyc + longint'(DLY);
      outq.push_back(it);
    end
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      arm_in_valid <= 1'b0;
      arm_in_pkt   <= '0;
    end else begin
      if (arm_in_valid && arm_in_ready) void'(outq.pop_front());
      if (arm_out_valid) begin
        item_t it;
        it.p = arm_out_pkt;
        it.t = cyc + longint'(DLY);
        inq.push_back(it);
      end
      if (inq.size() > 0 && inq[0].t <= cyc) begin
        item_t it;
        it = inq.pop_front();
        core_process(it.p);
      end
      if (outq.size() > 0 && outq[0].t <= cyc) begin
        arm_in_valid <= 1'b1;
        arm_in_pkt   <= outq[0].p;
      end else begin
        arm_in_valid <= 1'b0;
        arm_in_pkt   <= '0;
      end
    end
  end

  // ---- connections ---------------------------------------------------------------
  logic [FLOW_W-1:0] conn   [LIVE];
  int                budget [LIVE];
  logic [FLOW_W-1:0] next_id = 32'h1000_0000;
  int                len_max = 400;
  logic [STATE_W-1:0] backend [logic [FLOW_W-1:0]];
  int  out_cnt [int];
  int  sent = 0, recv = 0, goal = 0, closed = 0, ph_fast = 0, ph_recv = 0;
  bit  gen_on = 1'b0, have = 1'b0;
  pkt_t cur;
  int  lens [2] = '{400, 12};  // L of the slow and the fast phase

  function automatic pkt_t mk_pkt(int n);
    pkt_t p;
    int   i;
    i = ($urandom % 2 == 0) ? int'($urandom % 32) : int'($urandom % LIVE);
    p         = '0;
    p.flow_id = conn[i];
    p.seq     = SEQ_W'(n);
    p.op      = OP_DATA;
    budget[i]--;
    if (budget[i] == 0) begin
      // close it: the slot gets a new connection
      conn[i]   = next_id;
      next_id   = next_id + 1;
      budget[i] = 4 + int'($urandom % len_max);
      closed++;
    end
    return p;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (net_in_valid && net_in_ready) begin
        out_cnt[int'(net_in_pkt.seq)] = 0;
        sent++;
        have = 1'b0;
      end
      if (!have && gen_on && sent < goal && ($urandom % 100) < 60) begin
        cur  = mk_pkt(sent);
        have = 1'b1;
      end
      net_in_valid <= have;
      net_in_pkt   <= have ? cur : '0;
    end else begin
      net_in_valid <= 1'b0;
      net_in_pkt   <= '0;
    end
  end

  always @(posedge clk) begin
    if (rst_n && net_out_valid) begin
      int n;
      n = int'(net_out_pkt.seq);
      recv++;
      ph_recv++;
      check(out_cnt.exists(n) && out_cnt[n] == 0, $sformatf("packet %0d left twice or was never sent", n));
      if (out_cnt.exists(n)) out_cnt[n]++;
      if (backend.exists(net_out_pkt.flow_id))
        check(net_out_pkt.arg == backend[net_out_pkt.flow_id],
              $sformatf("connection %h moved from backend %0d to %0d", net_out_pkt.flow_id,
                        backend[net_out_pkt.flow_id], net_out_pkt.arg));
      else backend[net_out_pkt.flow_id] = net_out_pkt.arg;
    end
  end

  int c_req = 0, c_acc = 0, c_ttl = 0, c_rst = 0, c_coll = 0, c_cold = 0;
  always @(posedge clk) if (rst_n) begin
    c_req   += int'(ev.state_req);
    c_acc   += int'(ev.resp_accept);
    c_ttl   += int'(ev.ttl_expire);
    c_rst   += int'(ev.reset);
    c_coll  += int'(ev.collision);
    c_cold  += int'(ev.cold);
    ph_fast += int'(ev.fast_hit);
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0;
    longint t0;
    cfg.hh_threshold = 16'd2;
    cfg.ttl          = 32'd4000;
    cfg.timeout      = 32'd1000;
    cfg.reset_delay  = 32'd200;
    for (int i = 0; i < LIVE; i++) begin
      conn[i]   = next_id;
      next_id   = next_id + 1;
      budget[i] = 4 + int'($urandom % len_max);
    end

    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    while (init_busy) @(posedge clk);
    @(posedge clk);
    gen_on = 1'b1;
    foreach (lens[ph]) begin
      // slow churn: long connections; fast churn: short ones
      len_max = lens[ph];
      for (int i = 0; i < LIVE; i++) if (budget[i] > lens[ph]) budget[i] = lens[ph];
      goal   += 30_000;
      ph_fast = 0;
      ph_recv = 0;
      c0      = closed;
      t0      = cyc;
      while (sent < goal) @(posedge clk);
      repeat (200) @(posedge clk);
      $display("phase %0d: %0d connections closed in %0d cycles, %0d of %0d packets served in the switch",
               ph, closed - c0, cyc - t0, ph_fast, ph_recv);
      if (ph == 0) check(ph_fast * 4 > ph_recv, "less than 25% served in the switch at slow churn");
    end
    gen_on = 1'b0;

    repeat (60_000) @(posedge clk);
    check(recv == sent, $sformatf("%0d packets out, %0d in", recv, sent));
    check(inq.size() == 0 && outq.size() == 0, "cores still busy after drain");
    $display("events: pulls %0d, inserted %0d, TTL %0d, resets %0d, collisions %0d, cold %0d; cores: %0d connections, %0d write-backs",
             c_req, c_acc, c_ttl, c_rst, c_coll, c_cold, n_new_conn, n_wb_applied);
    check(c_req > 0 && c_acc > 0 && c_ttl > 0 && c_rst > 0, "a churn mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
