// tb_delay_line: drives the two-phase delay line with a random sequence and
// checks that q shows the previous sample throughout ck1 (even while d
// changes), that it takes the new sample during ck2, holds it between
// phases, and that rst_n clears it.
module tb_delay_line;
  localparam int W = 16;
  logic rst_n, ck1, ck2;
  logic [W-1:0] d, q, prev;
  int checks = 0, failures = 0;

  delay_line #(.W(W)) dut (.rst_n(rst_n), .ck1(ck1), .ck2(ck2), .d(d), .q(q));

  task automatic expect_q(logic [W-1:0] exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, exp);
    end
  endtask

  initial begin
    ck1 = 0; ck2 = 0; d = 16'hDEAD; rst_n = 0;
    #2 expect_q('0, "reset");
    rst_n = 1;
    prev = '0;
    for (int n = 0; n < 500; n++) begin
      logic [W-1:0] v;
      v = W'($urandom);
      ck1 = 1;
      d = ~v;           // a value that changes during ck1 ...
      #1 expect_q(prev, "ck1 early");
      d = v;            // ... the last value before ck1 falls is stored
      #1 expect_q(prev, "ck1 late");
      ck1 = 0;
      #1 d = W'($urandom);   // changes outside ck1 must not be stored
      expect_q(prev, "gap");
      ck2 = 1;
      #1 expect_q(v, "ck2");
      ck2 = 0;
      #1 expect_q(v, "after ck2");
      prev = v;
    end
    rst_n = 0;
    #1 expect_q('0, "reset again");
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
