// tb_nf_simple_op: drives all four network-function variants with random
// and directed packets and compares next state, result, complex and drop with
// a reference written from the functions' definitions.
module tb_nf_simple_op;
  import switchnic_pkg::*;
  int checks = 0, failures = 0;

  nf_op_e             op;
  logic [SEQ_W-1:0]   seq;
  logic [LEN_W-1:0]   len;
  logic [STATE_W-1:0] arg, st;
  logic [STATE_W-1:0] ns [4], rs [4];
  logic               cx [4], dr [4];

  nf_simple_op #(.NF(NF_REASSEMBLER)) u0 (.op, .seq, .len, .arg, .state(st), .new_state(ns[0]), .result(rs[0]), .complex_op(cx[0]), .drop(dr[0]));
  nf_simple_op #(.NF(NF_KVSTORE))     u1 (.op, .seq, .len, .arg, .state(st), .new_state(ns[1]), .result(rs[1]), .complex_op(cx[1]), .drop(dr[1]));
  nf_simple_op #(.NF(NF_LOADBAL))     u2 (.op, .seq, .len, .arg, .state(st), .new_state(ns[2]), .result(rs[2]), .complex_op(cx[2]), .drop(dr[2]));
  nf_simple_op #(.NF(NF_FIREWALL))    u3 (.op, .seq, .len, .arg, .state(st), .new_state(ns[3]), .result(rs[3]), .complex_op(cx[3]), .drop(dr[3]));

  task automatic expect_nf(int n, logic [31:0] e_ns, logic e_cx, logic e_dr, logic chk_res, logic [31:0] e_rs);
    checks++;
    if (ns[n] !== e_ns || cx[n] !== e_cx || dr[n] !== e_dr || (chk_res && rs[n] !== e_rs)) begin
      failures++;
      $display("FAIL nf%0d op=%0d seq=%h len=%0d st=%h: ns=%h cx=%b dr=%b rs=%h (exp %h %b %b %h)",
               n, op, seq, len, st, ns[n], cx[n], dr[n], rs[n], e_ns, e_cx, e_dr, e_rs);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_in = 0, n_ooo = 0;
    for (int t = 0; t < 3000; t++) begin
      op  = nf_op_e'($urandom % 4);
      st  = $urandom;
      len = 16'($urandom % 1500);
      seq = ($urandom % 2) ? st : ($urandom % 2) ? st + 32'($urandom % 3000) : st - 32'($urandom % 3000) - 1;
      arg = $urandom;
      #1;
      // reassembler
      if (op == OP_COMPLEX)       expect_nf(0, st, 1, 0, 0, 0);
      else if (seq == st)  begin  expect_nf(0, st + 32'(len), 0, 0, 1, st + 32'(len)); n_in++; end
      else                 begin  expect_nf(0, st, 1, 0, 0, 0); n_ooo++; end
      // key-value store
      if (op == OP_COMPLEX)       expect_nf(1, st, 1, 0, 0, 0);
      else if (op == OP_WRITE)    expect_nf(1, arg, 0, 0, 1, arg);
      else                        expect_nf(1, st, 0, 0, 1, st);
      // load balancer
      if (op == OP_COMPLEX)       expect_nf(2, st, 1, 0, 0, 0);
      else                        expect_nf(2, st, 0, 0, 1, st);
      // firewall
      if (op == OP_COMPLEX)       expect_nf(3, st, 1, 0, 0, 0);
      else                        expect_nf(3, st, 0, !st[0], 0, 0);
    end
    checks++; if (n_in == 0 || n_ooo == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
