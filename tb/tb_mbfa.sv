// tb_mbfa: checks the 16-bit multi-bit full adder against integer addition,
// for corner values and random operands, sum and carry out.
module tb_mbfa;
  localparam int W = 16;
  logic [W-1:0] a, b, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  mbfa #(.W(W)) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  task automatic check(logic [W-1:0] ta, logic [W-1:0] tb_, logic tc);
    longint exp;
    a = ta; b = tb_; cin = tc;
    #1;
    exp = longint'(ta) + longint'(tb_) + longint'(tc);
    checks++;
    if ({cout, s} !== (W+1)'(exp)) begin
      failures++;
      $display("FAIL %h + %h + %b: got %b %h, expected %h", ta, tb_, tc, cout, s, exp);
    end
  endtask

  initial begin
    check('0, '0, 0);
    check('1, '0, 1);
    check('1, '1, 1);
    check(16'h7FFF, 16'h0001, 0);
    check(16'h8000, 16'h8000, 0);
    check(16'h1234, ~16'h1234, 1);
    for (int n = 0; n < 3000; n++) check(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
