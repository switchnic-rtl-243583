// tb_frozen_state_stage: random slots (hit, insert, delete, expire, none)
// on an 8-entry stage with the reassembler NF, compared cycle by cycle with
// a reference of the frozen flag, the duplicated key and value. Checks that a
// complex packet freezes the entry in the same slot and carries the value
// from before it, that every later hit carries the frozen value as a
// write-back without updating it, that insert/delete clear the flag, and that
// TTL expiry emits a header-only write-back under the stored key.
module tb_frozen_state_stage;
  import switchnic_pkg::*;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, busy, ofz;
  slot_t in_s, out_s;
  logic [2:0] in_i, out_i;
  logic [31:0] oval;
  event_t ev;
  always #5 clk = ~clk;

  frozen_state_stage #(.NF(NF_REASSEMBLER), .ENTRIES(N)) dut (
    .clk, .rst_n, .in_slot(in_s), .in_idx(in_i), .out_slot(out_s), .out_idx(out_i),
    .out_val(oval), .out_frozen(ofz), .ev, .busy);

  bit          fz   [N];
  logic [31:0] dval [N], dkey [N];
  bit          ins  [N];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    slot_t q, e;
    event_t ee;
    logic [31:0] ev_val;
    int i, n_frz = 0, n_rep = 0, n_fast = 0, n_exp = 0;
    in_s = '0; in_i = '0;
    @(posedge clk); #1 rst_n = 1;
    while (busy) @(posedge clk);
    #1;
    for (int t = 0; t < 4000; t++) begin
      i = $urandom % N;
      q = '0;
      q.valid = 1'b1;
      q.src = SRC_NET;
      q.pkt.flow_id = ins[i] ? dkey[i] : $urandom;
      q.pkt.len = 16'(1 + $urandom % 1000);
      q.pkt.op = OP_DATA;
      case ($urandom % 10)
        0, 1:    begin q.act = ACT_INSERT; q.src = SRC_ARM; q.pkt.flow_id = $urandom; q.pkt.hdr.state = $urandom; end
        2:       q.act = ins[i] ? ACT_DELETE : ACT_NONE;
        3:       q.act = ins[i] ? ACT_EXPIRE : ACT_NONE;
        4:       q.act = ACT_NONE;
        default: q.act = ins[i] ? ACT_HIT : ACT_NONE;
      endcase
      q.pkt.seq = ($urandom % 5 == 0) ? $urandom : dval[i];
      // reference
      e = q; ee = '0; ev_val = dval[i];
      case (q.act)
        ACT_HIT:
          if (fz[i]) begin
            e.to_arm = 1; e.wb = 1; e.pb_state = dval[i]; ee.wb_repeat = 1; n_rep++;
          end else if (q.pkt.seq != dval[i]) begin
            e.to_arm = 1; e.wb = 1; e.pb_state = dval[i]; ee.freeze = 1; fz[i] = 1; n_frz++;
          end else begin
            dval[i] = dval[i] + 32'(q.pkt.len); e.pkt.arg = dval[i]; ee.fast_hit = 1; ev_val = dval[i]; n_fast++;
          end
        ACT_INSERT: begin dval[i] = q.pkt.hdr.state; dkey[i] = q.pkt.flow_id; fz[i] = 0; ins[i] = 1; ev_val = dval[i]; end
        ACT_DELETE: fz[i] = 0;
        ACT_EXPIRE: begin
          e.to_arm = 1; e.wb = 1; e.pb_state = dval[i]; e.drop = 0;
          e.pkt.flow_id = dkey[i]; e.pkt.ctrl_only = 1; e.pkt.seq = 0; e.pkt.len = 0; e.pkt.op = OP_DATA; e.pkt.arg = 0;
          if (fz[i]) ee.wb_repeat = 1; else ee.freeze = 1;
          fz[i] = 1; n_exp++;
        end
        default: ;
      endcase
      in_s = q; in_i = 3'(i);
      @(posedge clk); #1;
      checks++;
      if (out_s != e || ev != ee || ofz != fz[i] || (ins[i] && oval != ev_val) || out_i != 3'(i)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d act=%0d idx=%0d: arm=%b wb=%b pb=%h ev=%b fz=%b val=%h (exp %b %b %h %b %b %h)",
          t, q.act, i, out_s.to_arm, out_s.wb, out_s.pb_state, ev, ofz, oval, e.to_arm, e.wb, e.pb_state, ee, fz[i], ev_val);
      end
    end
    checks++; if (n_frz == 0 || n_rep == 0 || n_fast == 0 || n_exp == 0) failures++;
    $display("freeze %0d repeat %0d fast %0d expire %0d", n_frz, n_rep, n_fast, n_exp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
