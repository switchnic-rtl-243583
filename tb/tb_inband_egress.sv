// tb_inband_egress: random slots; checks steering (ARM / network / none),
// the in-band header written towards the ARM cores (req, wb, piggybacked
// state, resp/ack cleared), header stripping towards the network, dropping
// of header-only and denied packets, and the one-cycle output latency.
module tb_inband_egress;
  import switchnic_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  slot_t s;
  logic nv, av;
  pkt_t np, ap;
  always #5 clk = ~clk;

  inband_egress dut (.clk, .rst_n, .in_slot(s), .net_valid(nv), .net_pkt(np), .arm_valid(av), .arm_pkt(ap));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    slot_t q;
    pkt_t e;
    int n_arm = 0, n_net = 0, n_none = 0;
    s = '0;
    @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      q = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      q.valid = ($urandom % 8 != 0);
      q.drop  = ($urandom % 6 == 0);
      q.pkt.ctrl_only = ($urandom % 5 == 0);
      s = q;
      @(posedge clk); #1;
      checks++;
      if (q.valid && q.to_arm && !q.drop) begin
        e = q.pkt;
        e.hdr.flags = '{req: q.req, resp: 1'b0, wb: q.wb, ack: 1'b0};
        e.hdr.state = q.wb ? q.pb_state : '0;
        if (!av || nv || ap != e) begin failures++; $display("FAIL to arm"); end
        n_arm++;
      end else if (q.valid && !q.to_arm && !q.drop && !q.pkt.ctrl_only) begin
        e = q.pkt; e.hdr = '0;
        if (av || !nv || np != e) begin failures++; $display("FAIL to net"); end
        n_net++;
      end else begin
        if (av || nv) begin failures++; $display("FAIL emitted a dropped slot"); end
        n_none++;
      end
    end
    checks++; if (n_arm == 0 || n_net == 0 || n_none == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
