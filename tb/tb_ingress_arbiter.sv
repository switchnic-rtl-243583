// tb_ingress_arbiter: random request patterns; checks the fixed priority
// (ARM returns, then network, then sweep), the ready signals, the slot source
// and contents, and that a network packet's in-band header is cleared.
module tb_ingress_arbiter;
  import switchnic_pkg::*;
  int checks = 0, failures = 0;
  logic  av, nv, sv, ar, nr, sr;
  pkt_t  ap, np;
  slot_t s;

  ingress_arbiter dut (.arm_valid(av), .arm_ready(ar), .arm_pkt(ap), .net_valid(nv), .net_ready(nr),
                       .net_pkt(np), .sweep_valid(sv), .sweep_ready(sr), .slot(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pkt_t e;
    for (int t = 0; t < 2000; t++) begin
      av = $urandom % 2; nv = $urandom % 2; sv = $urandom % 2;
      ap = {$urandom, $urandom, $urandom, $urandom, $urandom};
      np = {$urandom, $urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (ar !== 1'b1 || nr !== !av || sr !== (!av && !nv)) begin
        failures++; $display("FAIL ready av=%b nv=%b sv=%b: %b %b %b", av, nv, sv, ar, nr, sr);
      end
      checks++;
      if (av) begin
        if (!s.valid || s.src != SRC_ARM || s.pkt != ap) begin failures++; $display("FAIL arm slot"); end
      end else if (nv) begin
        e = np; e.hdr = '0;
        if (!s.valid || s.src != SRC_NET || s.pkt != e) begin failures++; $display("FAIL net slot"); end
      end else if (sv) begin
        if (!s.valid || s.src != SRC_SWEEP) begin failures++; $display("FAIL sweep slot"); end
      end else if (s.valid) begin
        failures++; $display("FAIL empty slot valid");
      end
      checks++;
      if (s.act != ACT_NONE || s.to_arm || s.drop || s.req || s.wb) begin failures++; $display("FAIL decisions not clear"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
