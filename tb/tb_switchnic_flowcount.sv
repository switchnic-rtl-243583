// tb_switchnic_flowcount: how the share of packets served in the switch
// changes with the number of flows, for the packet reassembler at the
// default table size of 32768 entries.
//
// Workload: uniform traffic. Every packet picks one of N flows at random
// and carries that flow's next in-order segment. Three phases use N = 1,000,
// 16,000 and 64,000 flows, with 8 packets per flow on average. The TTL is
// long during the phases, so capacity and hash collisions limit caching,
// not idle time. At the end the TTL is shortened, so every cached state is
// written back.
// The cores are the behavioural model in arm_core_model.
// Checks:
//  - per flow, packets leave in sequence order, and each leaves exactly once;
//  - after the drain, the cores hold every flow's byte count;
//  - with 1,000 flows most packets are served in the switch;
//  - the switch's share falls as the flow count grows past what the table
//    holds, and hash collisions appear.
// The flow counts and packets per flow are this testbench's choices.
module tb_switchnic_flowcount;
  import switchnic_pkg::*;

  localparam int PKT_PER_FLOW = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cfg_t   cfg;
  logic   net_in_valid, net_in_ready, arm_in_valid, arm_in_ready;
  pkt_t   net_in_pkt, arm_in_pkt, net_out_pkt, arm_out_pkt;
  logic   net_out_valid, arm_out_valid, init_busy;
  event_t ev;

  switchnic_dataplane u_dut (
    .clk, .rst_n, .cfg, .cms_clear(1'b0), .sweep_en(1'b1),
    .net_in_valid, .net_in_ready, .net_in_pkt,
    .arm_in_valid, .arm_in_ready, .arm_in_pkt,
    .net_out_valid, .net_out_pkt, .arm_out_valid, .arm_out_pkt,
    .ev, .init_busy
  );

  arm_core_model #(.IN_DELAY(20), .OUT_DELAY(20)) u_arm (
    .clk, .rst_n, .in_valid(arm_out_valid), .in_pkt(arm_out_pkt),
    .out_valid(arm_in_valid), .out_ready(arm_in_ready), .out_pkt(arm_in_pkt),
    .decline_flow(32'hFFFF_FFFF)
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

  // flow f of the current phase has ID base + f
  logic [31:0] snd  [logic [FLOW_W-1:0]];  // next byte to send
  logic [31:0] expo [logic [FLOW_W-1:0]];  // next byte expected out
  logic [FLOW_W-1:0] base = 32'h0100_0000;
  int  nflows = 0, sent = 0, recv = 0, goal = 0, ph_fast = 0, ph_recv = 0, c_coll = 0;
  int  counts [3] = '{1000, 16000, 64000};
  int  share [3];
  bit  gen_on = 1'b0, have = 1'b0;
  pkt_t cur;

  function automatic pkt_t mk_pkt();
    pkt_t p;
    logic [FLOW_W-1:0] f;
    f = base + FLOW_W'($urandom % nflows);
    if (!snd.exists(f)) begin
      snd[f]  = $urandom;
      expo[f] = snd[f];
    end
    p         = '0;
    p.flow_id = f;
    p.seq     = snd[f];
    p.len     = 16'd1024;
    p.op      = OP_DATA;
    snd[f]    = snd[f] + 32'd1024;
    return p;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (net_in_valid && net_in_ready) begin
        sent++;
        have = 1'b0;
      end
      if (!have && gen_on && sent < goal && ($urandom % 100) < 60) begin
        cur  = mk_pkt();
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
      logic [FLOW_W-1:0] f;
      f = net_out_pkt.flow_id;
      recv++;
      ph_recv++;
      check(expo.exists(f) && net_out_pkt.seq == expo[f],
            $sformatf("flow %h: seq %0d left, %0d expected", f, net_out_pkt.seq, expo[f]));
      if (expo.exists(f)) expo[f] = net_out_pkt.seq + 32'(net_out_pkt.len);
    end
  end

  always @(posedge clk) if (rst_n) begin
    ph_fast += int'(ev.fast_hit);
    c_coll  += int'(ev.collision);
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0, nbad;
    cfg.hh_threshold = 16'd1;
    cfg.ttl          = 32'd2_000_000;
    cfg.timeout      = 32'd1000;
    cfg.reset_delay  = 32'd200;

    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    while (init_busy) @(posedge clk);
    @(posedge clk);
    gen_on = 1'b1;
    foreach (counts[ph]) begin
      nflows  = counts[ph];
      base    = base + 32'h0100_0000;
      goal   += nflows * PKT_PER_FLOW;
      c0      = c_coll;
      ph_fast = 0;
      ph_recv = 0;
      while (sent < goal) @(posedge clk);
      repeat (200) @(posedge clk);
      share[ph] = (ph_fast * 100) / (ph_recv > 0 ? ph_recv : 1);
      $display("%6d flows: %0d packets, %0d%% served in the switch, %0d collisions",
               nflows, ph_recv, share[ph], c_coll - c0);
    end
    gen_on = 1'b0;
    check(share[0] > 50, "with 1,000 flows at most half of the packets were served in the switch");
    check(share[1] > share[2], "the switch's share did not fall beyond the table size");
    check(c_coll > 0, "no hash collision seen");

    // Drain: short TTL, every cached state goes back to the cores.
    cfg.ttl = 32'd2000;
    repeat (250_000) @(posedge clk);
    check(recv == sent, $sformatf("%0d packets out, %0d in", recv, sent));
    check(u_arm.pending() == 0, "cores still busy after drain");
    nbad = 0;
    foreach (snd[f]) if (u_arm.state_of(f) != snd[f] || expo[f] != snd[f]) nbad++;
    check(nbad == 0, $sformatf("%0d flows with a wrong byte count at the cores", nbad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
