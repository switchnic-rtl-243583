// ttl_sweeper: time base and table walk for the recency rules.
//
// `now` counts clock cycles from reset and timestamps every table touch.
// The sweeper offers one maintenance slot per cycle for table index `idx`;
// each time a slot is taken (ready) the index steps to the next entry,
// wrapping at ENTRIES, so in idle cycles the whole table is revisited and
// stage 1 can apply the TTL, incomplete-timeout and reset checks to every
// entry. The TTL timer and self-cleaning come from the document; doing them
// by a walk in idle pipeline slots is this design's choice.
module ttl_sweeper
  import switchnic_pkg::*;
#(
  parameter int ENTRIES = 32768,
  parameter int IW      = $clog2(ENTRIES)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable,
  output logic            valid,
  input  logic            ready,
  output logic [IW-1:0]   idx,
  output logic [TS_W-1:0] now
);
  assign valid = enable;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx <= '0;
      now <= '0;
    end else begin
      now <= now + 1'b1;
      if (valid && ready) idx <= (idx == IW'(ENTRIES - 1)) ? '0 : idx + 1'b1;
    end
  end
endmodule
