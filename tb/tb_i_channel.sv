// tb_i_channel: drives the integral channel with the two clock phases and a
// random error sequence (with runs of large same-sign errors that drive the
// running sum into both clamps), and compares Y_I and ovf after each ck1
// with an integer model: acc = clamp16(acc + E_I*e), Y_I = acc/D_I. Changes
// E_I and D_I between blocks of samples, and checks that rst_n clears the
// sum.
module tb_i_channel;
  import pid_ref_pkg::*;
  logic rst_n, ck1, ck2, ovf;
  logic [7:0] e, k;
  logic [8:0] d;
  logic [23:0] y;
  int checks = 0, failures = 0;
  int n_sat_pos = 0, n_sat_neg = 0;
  longint acc;

  i_channel dut (.rst_n(rst_n), .ck1(ck1), .ck2(ck2), .e(e), .k(k), .d(d), .y(y), .ovf(ovf));

  task automatic sample(int ei, int sh);
    longint exact, exp;
    e = 8'(ei);
    ck1 = 1; #2; ck1 = 0; #1;
    exact = acc + longint'(ei) * k;
    acc = clamp16(exact);
    exp = scaled(acc, sh);
    checks++;
    if (sext(64'(y), 24) != exp || ovf != (exact != acc)) begin
      failures++;
      $display("FAIL e=%0d: got %0d ovf=%b expected %0d", ei, sext(64'(y), 24), ovf, exp);
    end
    if (exact > 32767) n_sat_pos++;
    if (exact < -32768) n_sat_neg++;
    ck2 = 1; #1; ck2 = 0; #1;
  endtask

  initial begin
    ck1 = 0; ck2 = 0; rst_n = 0; e = 0; k = 0; d = 9'd1;
    #2 rst_n = 1; acc = 0;
    for (int blk = 0; blk < 40; blk++) begin
      int sh;
      sh = int'($urandom_range(0, 8));
      k = 8'($urandom);
      d = 9'd1 << sh;
      for (int n = 0; n < 50; n++) begin
        int ei;
        if (blk % 4 == 1)      ei = int'($urandom_range(60, 127));
        else if (blk % 4 == 3) ei = -int'($urandom_range(60, 128));
        else                   ei = $signed(8'($urandom));
        sample(ei, sh);
      end
    end
    rst_n = 0; #1; rst_n = 1; acc = 0;
    k = 8'd127; d = 9'd1 << 8;
    sample(3, 8);
    checks++;
    if (n_sat_pos == 0 || n_sat_neg == 0) begin failures++; $display("FAIL clamps not exercised"); end
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
