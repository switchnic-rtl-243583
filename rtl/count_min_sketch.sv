// count_min_sketch: per-flow packet-count estimate and heavy-hitter flag.
//
// ROWS independent rows of COLS saturating counters, each row indexed by its
// own hash of the flow ID. For every slot with upd=1 all ROWS counters of the
// key are incremented (read-modify-write in one cycle, like a stateful ALU)
// and the estimate is the minimum of the incremented values. The result is
// registered: est/heavy belong to the slot presented one cycle earlier.
// heavy = (est > threshold). After reset, and after a clear pulse from the
// control plane (to restart the frequency window), the counters are wiped one
// column per cycle; for those COLS cycles nothing is counted and no flow is
// reported heavy (busy=1).
// Following the document: a count-min sketch estimates each flow's packet
// count and a configurable threshold marks heavy hitters. The row count,
// width, counter size and the clear input are this design's choices.
module count_min_sketch #(
  parameter int          KEY_W = 32,
  parameter int          ROWS  = 2,
  parameter int          COLS  = 4096,
  parameter int          CTR_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             upd,
  input  logic [KEY_W-1:0] key,
  input  logic [CTR_W-1:0] threshold,
  output logic [CTR_W-1:0] est,
  output logic             heavy,
  output logic             busy
);
  localparam int IW = $clog2(COLS);
  localparam logic [31:0] SEEDS [4] = '{32'h9E37_79B1, 32'h85EB_CA77, 32'hC2B2_AE3D, 32'h27D4_EB2F};

  logic [CTR_W-1:0] ctr [ROWS][COLS];
  logic [IW-1:0]    idx [ROWS];
  logic [CTR_W-1:0] nxt [ROWS];
  logic [CTR_W-1:0] min_c;
  logic             wiping;
  logic [IW-1:0]    wipe_idx;

  // Counter wipe after reset or clear: one column per cycle, as an SRAM would.
  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      wiping   <= 1'b1;
      wipe_idx <= '0;
    end else if (wiping) begin
      wipe_idx <= wipe_idx + 1'b1;
      if (wipe_idx == IW'(COLS - 1)) wiping <= 1'b0;
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    flow_hash #(.KEY_W(KEY_W), .OUT_W(IW), .SEED(SEEDS[r % 4] + 32'(2 * (r / 4)))) u_h (.key(key), .idx(idx[r]));
    assign nxt[r] = (ctr[r][idx[r]] == '1) ? ctr[r][idx[r]] : ctr[r][idx[r]] + 1'b1;

    always_ff @(posedge clk) begin
      if (wiping)   ctr[r][wipe_idx] <= '0;
      else if (upd) ctr[r][idx[r]]   <= nxt[r];
    end
  end

  assign busy = wiping;

  always_comb begin
    min_c = nxt[0];
    for (int r = 1; r < ROWS; r++) if (nxt[r] < min_c) min_c = nxt[r];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      est   <= '0;
      heavy <= 1'b0;
    end else begin
      est   <= (upd && !wiping) ? min_c : '0;
      heavy <= upd && !wiping && (min_c > threshold);
    end
  end
endmodule
