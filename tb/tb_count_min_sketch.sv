// tb_count_min_sketch: a 2 x 64 sketch fed with a skewed stream of keys.
// The reference keeps its own counter rows, indexed with a reference hash,
// so the estimate (minimum over rows of the incremented counters), the
// heavy-hitter flag (estimate above threshold), the one-cycle output latency,
// saturation of the counters and the wipe after reset and clear are all checked.
module tb_count_min_sketch;
  localparam int ROWS = 2, COLS = 64, CW = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, upd = 0, heavy, busy;
  logic [31:0] key;
  logic [CW-1:0] thr, est;
  always #5 clk = ~clk;

  count_min_sketch #(.KEY_W(32), .ROWS(ROWS), .COLS(COLS), .CTR_W(CW)) dut (
    .clk, .rst_n, .clear, .upd, .key, .threshold(thr), .est, .heavy, .busy);

  int ref_c [ROWS][COLS];
  logic [31:0] seeds [2] = '{32'h9E37_79B1, 32'h85EB_CA77};

  function automatic int ridx(logic [31:0] k, int r);
    logic [63:0] p;
    p = {32'd0, k ^ (k >> 16)} * {32'd0, seeds[r]};
    return int'(p[31:26]);
  endfunction

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n);
    logic [31:0] keys [6] = '{32'h11, 32'h2222, 32'h3333_3333, 32'h4444_0000, 32'h55, 32'h6};
    int e, nheavy = 0;
    for (int i = 0; i < n; i++) begin
      key = ($urandom % 3 == 0) ? $urandom : keys[($urandom % 2 == 0) ? 0 : $urandom % 6];
      upd = ($urandom % 4 != 0);
      e = 1 << 30;
      if (upd) for (int r = 0; r < ROWS; r++) begin
        int c;
        c = ref_c[r][ridx(key, r)] + 1;
        if (c > (1 << CW) - 1) c = (1 << CW) - 1;
        ref_c[r][ridx(key, r)] = c;
        if (c < e) e = c;
      end
      @(posedge clk);
      #1;
      if (upd) begin
        chk(est == CW'(e), $sformatf("est %0d expected %0d", est, e));
        chk(heavy == (e > int'(thr)), "heavy flag");
        nheavy += int'(heavy);
      end else begin
        chk(est == 0 && !heavy, "idle output");
      end
    end
    upd = 0;
    chk(nheavy > 0, "no heavy hitter seen");
  endtask

  initial begin
    thr = 8'd20;
    @(posedge clk); #1;
    rst_n = 1;
    chk(busy, "busy after reset");
    for (int i = 0; i < COLS + 5 && busy; i++) @(posedge clk);
    #1;
    chk(!busy, "wipe ended");
    foreach (ref_c[r, c]) ref_c[r][c] = 0;
    run(1000);  // long enough to saturate the busiest counter (255)
    // clear restarts the window
    clear = 1; @(posedge clk); #1; clear = 0;
    chk(busy, "busy after clear");
    while (busy) @(posedge clk);
    #1;
    foreach (ref_c[r, c]) ref_c[r][c] = 0;
    run(300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
