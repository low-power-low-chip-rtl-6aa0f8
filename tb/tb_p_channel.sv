// tb_p_channel: checks Y_P = e*E_P/D_P (8 fractional bits) for the worked
// coefficient examples K = 1/2, 17/32, 7/256 and 91/256, and for random
// errors, numerators and divisors.
module tb_p_channel;
  import pid_ref_pkg::*;
  logic [7:0] e, k;
  logic [8:0] d;
  logic [23:0] y;
  int checks = 0, failures = 0;

  p_channel dut (.e(e), .k(k), .d(d), .y(y));

  task automatic check(int ei, int ki, int sh);
    longint exp;
    e = 8'(ei); k = 8'(ki); d = 9'd1 << sh;
    #1;
    exp = scaled(longint'(ei) * ki, sh);
    checks++;
    if (sext(64'(y), 24) != exp) begin
      failures++;
      $display("FAIL e=%0d E=%0d k=%0d: got %0d expected %0d", ei, ki, sh, sext(64'(y), 24), exp);
    end
  endtask

  initial begin
    check(100, 1, 1);     // K = 1/2:   50.0
    check(100, 17, 5);    // K = 17/32: 53.125
    checks++;
    if (y !== 24'h0035_20) begin failures++; $display("FAIL 17/32 word %h", y); end
    check(-100, 7, 8);    // K = 7/256
    check(9, 91, 8);      // K = 91/256
    check(-128, 255, 0);
    check(127, 255, 0);
    for (int n = 0; n < 3000; n++) check($signed(8'($urandom)), int'($urandom_range(0, 255)), int'($urandom_range(0, 8)));
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
