// tb_ctrl_stage: walks one table entry through every transition of the
// per-entry FSM with directed slots and checks the action, the steering, the
// request flag and the event of each: request, cancel by a concurrent packet,
// stale response discarded, reset, successful pull, fast-path hit, hash
// collision, ACK delete, miss, cold flow, incomplete timeout, TTL expiry,
// inline reset of an old inactive entry, plus the flag wipe after reset.
module tb_ctrl_stage;
  import switchnic_pkg::*;
  localparam int N = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, busy;
  cfg_t cfg;
  logic [31:0] now = 0;
  slot_t in_s, out_s;
  logic [3:0] in_i, out_i;
  event_t ev;
  always #5 clk = ~clk;
  always @(posedge clk) now <= now + 1;

  ctrl_stage #(.ENTRIES(N)) dut (.clk, .rst_n, .cfg, .now, .in_slot(in_s), .in_idx(in_i),
                                 .out_slot(out_s), .out_idx(out_i), .ev, .busy);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Present one slot for one cycle and check what comes out.
  task automatic slot(src_e src, logic [31:0] flow, int idx, bit heavy, bit resp, bit ack,
                      act_e e_act, bit e_arm, bit e_req, event_t e_ev, string name);
    in_s = '0;
    in_s.valid = 1'b1;
    in_s.src = src;
    in_s.pkt.flow_id = flow;
    in_s.pkt.hdr.flags.resp = resp;
    in_s.pkt.hdr.flags.ack = ack;
    in_s.heavy = heavy;
    in_i = 4'(idx);
    @(posedge clk); #1;
    in_s = '0;
    checks++;
    if (!out_s.valid || out_s.act != e_act || out_s.to_arm != e_arm || out_s.req != e_req ||
        ev != e_ev || out_i != 4'(idx)) begin
      failures++;
      $display("FAIL %s: act=%0d arm=%b req=%b ev=%b (exp %0d %b %b %b)", name,
               out_s.act, out_s.to_arm, out_s.req, ev, e_act, e_arm, e_req, e_ev);
    end
  endtask

  function automatic event_t E(string which);
    event_t e;
    e = '0;
    case (which)
      "req":    e.state_req = 1;
      "cancel": e.cancel = 1;
      "disc":   e.resp_discard = 1;
      "acc":    e.resp_accept = 1;
      "reset":  e.reset = 1;
      "coll":   e.collision = 1;
      "ack":    e.ack_delete = 1;
      "miss":   e.miss = 1;
      "cold":   e.cold = 1;
      "tmo":    e.timeout = 1;
      "ttl":    e.ttl_expire = 1;
      default: ;
    endcase
    return e;
  endfunction

  task automatic idle(int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    event_t e;
    logic [31:0] A = 32'hA, B = 32'hB, C = 32'hC, D = 32'hD;
    cfg.hh_threshold = 16'd4;
    cfg.ttl = 32'd200;
    cfg.timeout = 32'd100;
    cfg.reset_delay = 32'd50;
    in_s = '0; in_i = '0;
    @(posedge clk); #1 rst_n = 1;
    checks++; if (!busy) failures++;
    idle(N + 1);
    checks++; if (busy) begin failures++; $display("FAIL wipe did not end"); end

    slot(SRC_NET, A, 3, 1, 0, 0, ACT_NONE, 1, 1, E("req"),    "request on free entry");
    slot(SRC_NET, A, 3, 1, 0, 0, ACT_NONE, 1, 0, E("cancel"), "concurrent packet cancels");
    slot(SRC_ARM, A, 3, 0, 1, 0, ACT_NONE, 0, 0, E("disc"),   "response after cancel discarded");
    slot(SRC_NET, A, 3, 1, 0, 0, ACT_NONE, 1, 0, E("miss"),   "inactive entry, too young to reset");
    idle(60);
    slot(SRC_SWEEP, 0, 3, 0, 0, 0, ACT_NONE, 0, 0, E("reset"), "sweep resets old inactive entry");
    slot(SRC_NET, A, 3, 1, 0, 0, ACT_NONE, 1, 1, E("req"),    "request again");
    slot(SRC_ARM, A, 3, 0, 1, 0, ACT_INSERT, 0, 0, E("acc"),  "response accepted");
    slot(SRC_NET, A, 3, 1, 0, 0, ACT_HIT, 0, 0, '0,           "fast-path hit");
    slot(SRC_NET, B, 3, 1, 0, 0, ACT_NONE, 1, 0, E("coll"),   "other flow collides");
    slot(SRC_ARM, B, 3, 0, 0, 1, ACT_NONE, 0, 0, '0,          "ACK of other flow ignored");
    slot(SRC_ARM, A, 3, 0, 0, 1, ACT_DELETE, 0, 0, E("ack"),  "ACK deletes");
    slot(SRC_NET, A, 3, 1, 0, 0, ACT_NONE, 1, 0, E("miss"),   "inactive after ACK");
    slot(SRC_NET, C, 5, 0, 0, 0, ACT_NONE, 1, 0, E("cold"),   "cold flow");
    slot(SRC_NET, D, 7, 1, 0, 0, ACT_NONE, 1, 1, E("req"),    "request for D");
    idle(110);
    slot(SRC_SWEEP, 0, 7, 0, 0, 0, ACT_NONE, 0, 0, E("tmo"),  "incomplete times out");
    slot(SRC_ARM, D, 7, 0, 1, 0, ACT_NONE, 0, 0, E("disc"),   "late response discarded");
    // inline reset: A's entry is inactive and older than reset_delay now
    e = E("req"); e.reset = 1'b1;
    slot(SRC_NET, A, 3, 1, 0, 0, ACT_NONE, 1, 1, e,           "old inactive entry freed and reclaimed");
    slot(SRC_ARM, A, 3, 0, 1, 0, ACT_INSERT, 0, 0, E("acc"),  "accepted");
    slot(SRC_SWEEP, 0, 3, 0, 0, 0, ACT_NONE, 0, 0, '0,        "young active entry kept");
    idle(210);
    slot(SRC_SWEEP, 0, 3, 0, 0, 0, ACT_EXPIRE, 0, 0, E("ttl"), "TTL expiry");
    checks++; if (out_s.pkt.flow_id != A || !out_s.drop) begin failures++; $display("FAIL expiry key"); end
    slot(SRC_SWEEP, 0, 3, 0, 0, 0, ACT_NONE, 0, 0, '0,        "timestamp refreshed by expiry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
