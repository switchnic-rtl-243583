// tb_flow_hash: checks the multiplicative hash against an independent
// reference (fold, xor-shift by 16, multiply by the seed, keep the top bits of
// the low 32) for two configurations, and that indices spread over the range.
module tb_flow_hash;
  int checks = 0, failures = 0;
  logic [31:0] k;
  logic [14:0] i15;
  logic [11:0] i12;
  logic [47:0] kw;
  logic [9:0]  iw;

  flow_hash #(.KEY_W(32), .OUT_W(15))                       u_a (.key(k),  .idx(i15));
  flow_hash #(.KEY_W(32), .OUT_W(12), .SEED(32'h85EB_CA77)) u_b (.key(k),  .idx(i12));
  flow_hash #(.KEY_W(48), .OUT_W(10))                       u_c (.key(kw), .idx(iw));

  function automatic logic [31:0] mix(logic [31:0] x, logic [31:0] seed);
    logic [63:0] p;
    p = {32'd0, x ^ (x >> 16)} * {32'd0, seed};
    return p[31:0];
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [1024];
    int distinct;
    logic [31:0] m;
    for (int n = 0; n < 4000; n++) begin
      k  = (n < 8) ? 32'(n) : $urandom;
      kw = {16'($urandom), k};
      #1;
      m = mix(k, 32'h9E37_79B1);
      checks++; if (i15 != m[31:17]) begin failures++; $display("FAIL a key=%h", k); end
      m = mix(k, 32'h85EB_CA77);
      checks++; if (i12 != m[31:20]) begin failures++; $display("FAIL b key=%h", k); end
      m = mix(k ^ {16'd0, kw[47:32]}, 32'h9E37_79B1);
      checks++; if (iw != m[31:22]) begin failures++; $display("FAIL c key=%h", kw); end
      seen[iw] = 1'b1;
    end
    distinct = 0;
    foreach (seen[j]) distinct += int'(seen[j]);
    checks++; if (distinct < 900) begin failures++; $display("FAIL poor spread %0d", distinct); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
