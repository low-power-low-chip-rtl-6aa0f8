// tb_ocb: checks the overflow control block. Two random 16-bit signed
// addends are summed with wrap-around; the block must return the exact sum
// when it fits and the nearest 16-bit limit otherwise, with ovf flagging the
// clamp.
module tb_ocb;
  import pid_ref_pkg::*;
  logic a_sign, b_sign, ovf;
  logic [15:0] sum, y;
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0;

  ocb dut (.a_sign(a_sign), .b_sign(b_sign), .sum(sum), .y(y), .ovf(ovf));

  task automatic check(longint a, longint b);
    longint exact, exp;
    a_sign = a < 0; b_sign = b < 0;
    exact = a + b;
    sum = 16'(exact);
    #1;
    exp = clamp16(exact);
    checks++;
    if (sext(64'(y), 16) != exp || ovf != (exp != exact)) begin
      failures++;
      $display("FAIL %0d + %0d: got %0d ovf=%b, expected %0d", a, b, sext(64'(y), 16), ovf, exp);
    end
    if (exact > 32767) n_pos++;
    if (exact < -32768) n_neg++;
  endtask

  initial begin
    check(32767, 1); check(-32768, -1); check(32767, -32768); check(0, 0);
    check(20000, 20000); check(-20000, -20000); check(-1, -1);
    for (int n = 0; n < 3000; n++)
      check(sext(64'($urandom), 16), sext(64'($urandom), 16));
    checks++;
    if (n_pos == 0 || n_neg == 0) failures++;
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
