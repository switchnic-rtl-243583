// tb_switchnic_kvstore: key-value store workload on the switch data plane
// (NF = NF_KVSTORE, default table of 32768 entries) with a varying share of
// write requests.
//
// Workload: 10,000 keys, requests drawn with a skew (half of them from 400
// hot keys), in three phases with write ratios of 0 %, 30 % and 90 %. One
// request in 200 is an atomic add, which only the cores can do.
// The cores are modelled inside this testbench. Each packet takes 20 cycles
// to reach them and 20 cycles to come back. For each key the model keeps a
// value and the write-back bit. It applies the first write-back of each
// freeze and ACKs every write-back. Then it executes the request: a read
// returns the value, a write replaces it, an add adds `arg` and returns the
// sum. It answers every state request with the value as it stands after the
// request.
// Checks:
//  - every request comes back to the network exactly once;
//  - its result equals that of a reference store that executes all requests
//    in the order the switch accepted them. A stale copy in the switch or in
//    the cores would show as a wrong read;
//  - after the traffic, TTL eviction returns every value to the cores, and
//    those values equal the reference store's;
//  - in each phase at least 40 % of the requests are served in the switch,
//    and with writes present some writes are among them.
// The skew, the hot set, the add operation and the delays are this
// testbench's choices. The key count and the table size are the evaluated
// setup's.
module tb_switchnic_kvstore;
  import switchnic_pkg::*;

  localparam int NKEYS    = 10_000;
  localparam int NHOT     = 400;
  localparam int PER_PH   = 20_000;
  localparam int ENTRIES  = 32768;
  localparam int DLY      = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cfg_t   cfg;
  logic   net_in_valid, net_in_ready, arm_in_valid, arm_in_ready;
  pkt_t   net_in_pkt, arm_in_pkt, net_out_pkt, arm_out_pkt;
  logic   net_out_valid, arm_out_valid, init_busy;
  event_t ev;

  switchnic_dataplane #(.NF(NF_KVSTORE)) u_dut (
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
  logic [STATE_W-1:0] cval  [logic [FLOW_W-1:0]];
  bit                 cwb   [logic [FLOW_W-1:0]];
  int n_wb_applied = 0, n_wb_ignored = 0, n_resp = 0, n_core_ops = 0;

  function automatic void core_emit(pkt_t p);
    item_t it;
    it.p = p;
    it.t = cyc + longint'(DLY);
    outq.push_back(it);
  endfunction

  function automatic void core_process(pkt_t p);
    logic [FLOW_W-1:0] k;
    pkt_t r;
    k = p.flow_id;
    if (!cval.exists(k)) begin
      cval[k] = '0;
      cwb[k]  = 1'b1;
    end
    r = p;
    r.hdr = '0;
    if (p.hdr.flags.wb) begin
      if (!cwb[k]) begin
        cval[k] = p.hdr.state;
        cwb[k]  = 1'b1;
        n_wb_applied++;
      end else n_wb_ignored++;
      r.hdr.flags.ack = 1'b1;
    end
    if (!p.ctrl_only) begin
      n_core_ops++;
      unique case (p.op)
        OP_WRITE:   cval[k] = p.arg;
        OP_COMPLEX: cval[k] = cval[k] + p.arg;
        default: ;
      endcase
      r.arg = cval[k];
      if (p.hdr.flags.req) begin
        r.hdr.flags.resp = 1'b1;
        r.hdr.state      = cval[k];
        cwb[k]           = 1'b0;
        n_resp++;
      end
    end
    if (!p.ctrl_only || p.hdr.flags.wb) core_emit(r);
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

  // ---- requests and the reference store ------------------------------------------
  logic [STATE_W-1:0] gold [NKEYS];
  logic [STATE_W-1:0] want [int];   // expected result, by request number
  int  phase_wr = 0, sent = 0, recv = 0, goal = 0;
  int  ph_fast, ph_recv;
  int  phase_wr_list [3] = '{0, 30, 90};
  bit  gen_on = 1'b0, have = 1'b0;
  pkt_t cur;

  function automatic int pick_key();
    if ($urandom % 2 == 0) return int'($urandom % NHOT);
    return int'($urandom % NKEYS);
  endfunction

  function automatic pkt_t mk_req(int n);
    pkt_t p;
    int   r;
    p         = '0;
    p.flow_id = FLOW_W'(pick_key());
    p.seq     = SEQ_W'(n);
    r         = int'($urandom % 1000);
    if (r < 5)                 p.op = OP_COMPLEX;
    else if (r < phase_wr * 10) p.op = OP_WRITE;
    else                       p.op = OP_READ;
    p.arg = (p.op == OP_READ) ? '0 : $urandom;
    return p;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (net_in_valid && net_in_ready) begin
        int k;
        k = int'(net_in_pkt.flow_id);
        unique case (net_in_pkt.op)
          OP_WRITE:   gold[k] = net_in_pkt.arg;
          OP_COMPLEX: gold[k] = gold[k] + net_in_pkt.arg;
          default: ;
        endcase
        want[int'(net_in_pkt.seq)] = gold[k];
        sent++;
        have = 1'b0;
      end
      if (!have && gen_on && sent < goal && ($urandom % 100) < 60) begin
        cur  = mk_req(sent);
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
      check(want.exists(n), $sformatf("request %0d left twice or was never sent", n));
      if (want.exists(n)) begin
        check(net_out_pkt.arg == want[n],
              $sformatf("request %0d key %0d op %0d: result %0d, expected %0d", n,
                        net_out_pkt.flow_id, net_out_pkt.op, net_out_pkt.arg, want[n]));
        want.delete(n);
      end
    end
  end

  int c_fast = 0, c_req = 0, c_acc = 0, c_frz = 0, c_ack = 0, c_ttl = 0, c_coll = 0, c_cancel = 0;
  always @(posedge clk) if (rst_n) begin
    c_fast   += int'(ev.fast_hit);
    c_req    += int'(ev.state_req);
    c_acc    += int'(ev.resp_accept);
    c_frz    += int'(ev.freeze);
    c_ack    += int'(ev.ack_delete);
    c_ttl    += int'(ev.ttl_expire);
    c_coll   += int'(ev.collision);
    c_cancel += int'(ev.cancel);
    ph_fast  += int'(ev.fast_hit);
  end

  // Writes served by the switch: a write whose request number never went to
  // the cores.
  bit went_arm [int];
  always @(posedge clk) if (rst_n && arm_out_valid && !arm_out_pkt.ctrl_only)
    went_arm[int'(arm_out_pkt.seq)] = 1'b1;
  int wr_switch = 0;
  always @(posedge clk) if (rst_n && net_out_valid && net_out_pkt.op == OP_WRITE &&
                            !went_arm.exists(int'(net_out_pkt.seq))) wr_switch++;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b, wr0;
    cfg.hh_threshold = 16'd2;
    cfg.ttl          = 32'd20000;
    cfg.timeout      = 32'd1000;
    cfg.reset_delay  = 32'd200;
    ph_fast = 0; ph_recv = 0;
    foreach (gold[i]) gold[i] = '0;

    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    while (init_busy) @(posedge clk);
    @(posedge clk);
    gen_on = 1'b1;
    foreach (phase_wr_list[i]) begin
      phase_wr = phase_wr_list[i];
      goal    += PER_PH;
      ph_fast  = 0;
      ph_recv  = 0;
      wr0      = wr_switch;
      while (sent < goal) @(posedge clk);
      repeat (200) @(posedge clk);
      $display("write ratio %2d%%: %0d requests out, %0d served in the switch (%0d%%), %0d writes in the switch",
               phase_wr, ph_recv, ph_fast, (ph_fast * 100) / (ph_recv > 0 ? ph_recv : 1),
               wr_switch - wr0);
      check(ph_fast * 5 > ph_recv * 2, "less than 40% of the requests served in the switch");
      if (phase_wr > 0) check(wr_switch > wr0, "no write served in the switch");
    end
    gen_on = 1'b0;

    // Drain: TTL eviction writes every cached value back to the cores.
    repeat (150_000) @(posedge clk);
    check(recv == sent, $sformatf("%0d requests out, %0d in", recv, sent));
    check(want.size() == 0, $sformatf("%0d requests never came back", want.size()));
    check(inq.size() == 0 && outq.size() == 0, "cores still busy after drain");
    b = 0;
    for (int i = 0; i < ENTRIES; i++) b += int'(u_dut.u_s1.flags_q[i].valid);
    check(b == 0, $sformatf("%0d table entries still in use", b));
    for (int k = 0; k < NKEYS; k++) begin
      logic [STATE_W-1:0] cv;
      cv = cval.exists(FLOW_W'(k)) ? cval[FLOW_W'(k)] : '0;
      check(cv == gold[k], $sformatf("key %0d: cores hold %0d, expected %0d", k, cv, gold[k]));
    end
    $display("events: fast %0d, pulls %0d, inserted %0d, cancelled %0d, collisions %0d, freezes %0d, ACKs %0d, TTL %0d",
             c_fast, c_req, c_acc, c_cancel, c_coll, c_frz, c_ack, c_ttl);
    $display("cores: %0d requests executed, %0d write-backs applied, %0d ignored, %0d responses",
             n_core_ops, n_wb_applied, n_wb_ignored, n_resp);
    check(c_acc > 0 && c_frz > 0 && c_ttl > 0 && n_wb_applied > 0, "a protocol mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
