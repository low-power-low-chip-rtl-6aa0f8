// tb_d_channel: drives the derivative channel with the two clock phases and
// a random error sequence and compares Y_D after each ck1 with the integer
// model wrap16(E_D*e(n) - E_D*e(n-1)) / D_D. Changes E_D and D_D between
// blocks, with the first sample of a block differenced against the product
// stored under the previous E_D, as the circuit stores products, not errors.
module tb_d_channel;
  import pid_ref_pkg::*;
  logic rst_n, ck1, ck2;
  logic [7:0] e, k;
  logic [8:0] d;
  logic [23:0] y;
  int checks = 0, failures = 0;
  longint prev_prod;

  d_channel dut (.rst_n(rst_n), .ck1(ck1), .ck2(ck2), .e(e), .k(k), .d(d), .y(y));

  task automatic sample(int ei, int sh);
    longint prod, exp;
    e = 8'(ei);
    ck1 = 1; #2; ck1 = 0; #1;
    prod = longint'(ei) * k;
    exp = scaled(wrap16(prod - prev_prod), sh);
    checks++;
    if (sext(64'(y), 24) != exp) begin
      failures++;
      $display("FAIL e=%0d: got %0d expected %0d", ei, sext(64'(y), 24), exp);
    end
    prev_prod = prod;
    ck2 = 1; #1; ck2 = 0; #1;
  endtask

  initial begin
    ck1 = 0; ck2 = 0; rst_n = 0; e = 0; k = 0; d = 9'd1;
    #2 rst_n = 1; prev_prod = 0;
    k = 8'd80; d = 9'd1 << 8;
    sample(5, 8);         // first sample against the cleared store
    sample(5, 8);         // no change: 0
    sample(-9, 8);
    for (int blk = 0; blk < 40; blk++) begin
      int sh;
      sh = int'($urandom_range(0, 8));
      k = 8'($urandom);
      d = 9'd1 << sh;
      for (int n = 0; n < 50; n++) sample($signed(8'($urandom)), sh);
    end
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
