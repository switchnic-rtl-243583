// ctrl_stage: stage 1 of the flow-state table - key, FSM flags, timestamp.
//
// Each of the ENTRIES entries holds the key of the flow it caches, four
// one-bit flags (valid, incomplete, active, inactive) and the time it was last
// touched. With the frozen flag of stage 3 they encode the per-entry FSM:
//   initial    valid=0
//   incomplete valid, incomplete   state requested from the ARM cores
//   active     valid, active       (frozen when stage 3's flag is set)
//   inactive   valid, inactive     waiting to be freed
// The "active" flag is the early indicator: it stays set while the entry is
// frozen, so a frozen entry's packets still reach stage 3, which holds the
// late indicator and sends them to the ARM cores.
//
// One read-modify-write of the indexed entry per cycle. Decisions:
//  network packet  (an inactive entry older than reset_delay counts as free)
//                  free entry + heavy flow -> claim, incomplete, request state
//                  free entry + cold flow  -> to ARM
//                  other flow's entry      -> to ARM (hash collision)
//                  own entry incomplete    -> inactive (cancel the pull) + to ARM
//                  own entry active        -> ACT_HIT (fast path or frozen)
//                  own entry inactive      -> to ARM
//  ARM packet      ack  on own active entry     -> inactive, ACT_DELETE
//                  resp on own incomplete entry -> active, ACT_INSERT
//                  resp otherwise               -> state discarded
//  sweep slot      incomplete older than timeout     -> inactive
//                  inactive older than reset_delay   -> initial
//                  active older than ttl             -> ACT_EXPIRE
// The FSM (states, events, cancel, timeout, ACK, reset) follows the document;
// the flag encoding, the use of one timestamp for TTL, timeout and reset, and
// the sweep-driven checks are this design's choices.
// Timing: output slot, index and events are registered (one cycle latency).
// After reset the flags are wiped one entry per cycle (ENTRIES cycles, busy=1).
module ctrl_stage
  import switchnic_pkg::*;
#(
  parameter int ENTRIES = 32768,
  parameter int IW      = $clog2(ENTRIES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  cfg_t          cfg,
  input  logic [TS_W-1:0] now,
  input  slot_t         in_slot,
  input  logic [IW-1:0] in_idx,
  output slot_t         out_slot,
  output logic [IW-1:0] out_idx,
  output event_t        ev,
  output logic          busy     // flag wipe after reset in progress
);
  logic [FLOW_W-1:0] key_q [ENTRIES];
  logic [TS_W-1:0]   ts_q  [ENTRIES];
  typedef struct packed {
    logic valid;
    logic incomplete;
    logic active;
    logic inactive;
  } flags_t;
  flags_t            flags_q [ENTRIES];
  flags_t            cur_f;
  logic              wiping;
  logic [IW-1:0]     wipe_idx;

  // Next values of the indexed entry.
  logic              wr_key, wr_ts;
  logic              n_valid, n_incomplete, n_active, n_inactive;
  slot_t             s;
  event_t            e;

  logic              e_valid, e_incomplete, e_active, e_inactive, mine, stale;
  logic [TS_W-1:0]   age;

  always_comb begin
    cur_f        = flags_q[in_idx];
    e_valid      = cur_f.valid;
    e_incomplete = cur_f.incomplete;
    e_active     = cur_f.active;
    e_inactive   = cur_f.inactive;
    mine         = e_valid && (key_q[in_idx] == in_slot.pkt.flow_id);
    age          = now - ts_q[in_idx];
    stale        = e_valid && e_inactive && (age > cfg.reset_delay);

    n_valid      = e_valid;
    n_incomplete = e_incomplete;
    n_active     = e_active;
    n_inactive   = e_inactive;
    wr_key       = 1'b0;
    wr_ts        = 1'b0;
    s            = in_slot;
    s.act        = ACT_NONE;
    e            = '0;

    if (in_slot.valid) begin
      unique case (in_slot.src)
        SRC_NET: begin
          s.to_arm = 1'b1;
          if (!e_valid || stale) begin
            // Free entry (an inactive one past its reset delay is freed here).
            e.reset = stale;
            if (in_slot.heavy) begin
              n_valid = 1'b1; n_incomplete = 1'b1; n_active = 1'b0; n_inactive = 1'b0;
              wr_key = 1'b1; wr_ts = 1'b1;
              s.req = 1'b1;
              e.state_req = 1'b1;
            end else begin
              n_valid = 1'b0; n_inactive = 1'b0;
              e.cold = 1'b1;
            end
          end else if (!mine) begin
            e.collision = 1'b1;
          end else if (e_incomplete) begin
            n_incomplete = 1'b0; n_inactive = 1'b1; wr_ts = 1'b1;
            e.cancel = 1'b1;
          end else if (e_active) begin
            s.act = ACT_HIT; s.to_arm = 1'b0; wr_ts = 1'b1;
          end else begin
            e.miss = 1'b1;
          end
        end
        SRC_ARM: begin
          s.to_arm = 1'b0;
          if (in_slot.pkt.hdr.flags.ack) begin
            if (mine && e_active) begin
              n_active = 1'b0; n_inactive = 1'b1; wr_ts = 1'b1;
              s.act = ACT_DELETE;
              e.ack_delete = 1'b1;
            end
          end else if (in_slot.pkt.hdr.flags.resp) begin
            if (mine && e_incomplete) begin
              n_incomplete = 1'b0; n_active = 1'b1; wr_ts = 1'b1;
              s.act = ACT_INSERT;
              e.resp_accept = 1'b1;
            end else begin
              e.resp_discard = 1'b1;
            end
          end
        end
        SRC_SWEEP: begin
          s.to_arm = 1'b0;
          s.drop   = 1'b1;
          s.pkt.flow_id = key_q[in_idx];
          if (e_valid) begin
            if (e_incomplete && age > cfg.timeout) begin
              n_incomplete = 1'b0; n_inactive = 1'b1; wr_ts = 1'b1;
              e.timeout = 1'b1;
            end else if (e_inactive && age > cfg.reset_delay) begin
              n_valid = 1'b0; n_inactive = 1'b0;
              e.reset = 1'b1;
            end else if (e_active && age > cfg.ttl) begin
              s.act = ACT_EXPIRE; wr_ts = 1'b1;
              e.ttl_expire = 1'b1;
            end
          end
        end
        default: s.drop = 1'b1;
      endcase
    end
  end

  // After reset every entry's flags are cleared, one entry per cycle (as an
  // SRAM column would be); busy is high and slots must not be presented.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wiping   <= 1'b1;
      wipe_idx <= '0;
    end else if (wiping) begin
      wipe_idx <= wipe_idx + 1'b1;
      if (wipe_idx == IW'(ENTRIES - 1)) wiping <= 1'b0;
    end
  end

  assign busy = wiping;

  always_ff @(posedge clk) begin
    if (wiping)
      flags_q[wipe_idx] <= '0;
    else if (in_slot.valid)
      flags_q[in_idx] <= '{valid: n_valid, incomplete: n_incomplete, active: n_active, inactive: n_inactive};
  end

  always_ff @(posedge clk) begin
    if (in_slot.valid && wr_key) key_q[in_idx] <= in_slot.pkt.flow_id;
    if (in_slot.valid && wr_ts)  ts_q[in_idx]  <= now;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_slot <= '0;
      out_idx  <= '0;
      ev       <= '0;
    end else begin
      out_slot <= in_slot.valid ? s : '0;
      out_idx  <= in_idx;
      ev       <= e;
    end
  end

  // An entry is never in more than one FSM state.
  assert property (@(posedge clk) disable iff (!rst_n || wiping)
    $onehot0({n_incomplete, n_active, n_inactive}));
endmodule
