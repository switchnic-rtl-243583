// tb_ttl_sweeper: the time base counts cycles from reset, the walk offers a
// slot only when enabled, advances only on accepted slots and wraps at
// ENTRIES (a non-power-of-two size is used to check the wrap).
module tb_ttl_sweeper;
  localparam int N = 13;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, enable = 0, ready = 0, valid;
  logic [3:0] idx;
  logic [31:0] now;
  always #5 clk = ~clk;

  ttl_sweeper #(.ENTRIES(N)) dut (.clk, .rst_n, .enable, .valid, .ready, .idx, .now);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_idx = 0, wraps = 0;
    longint t = 0;
    @(posedge clk); #1;
    rst_n = 1;
    for (int c = 0; c < 500; c++) begin
      enable = ($urandom % 5 != 0);
      ready  = ($urandom % 3 != 0);
      #1;
      checks++; if (valid != enable || idx != 4'(exp_idx) || now != 32'(t)) begin
        failures++; $display("FAIL c=%0d valid=%b idx=%0d exp %0d now=%0d exp %0d", c, valid, idx, exp_idx, now, t);
      end
      @(posedge clk); #1;
      t++;
      if (enable && ready) begin
        exp_idx = (exp_idx == N - 1) ? 0 : exp_idx + 1;
        if (exp_idx == 0) wraps++;
      end
    end
    checks++; if (wraps < 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
