// tb_clock_gen_2ph: runs the two-phase generator for many sample periods and
// checks, cycle by cycle, that ck1 and ck2 never overlap, that an idle
// cycle separates them, that ck1 lasts SAMPLE_CYCLES-3 cycles and ck2 one,
// that y_valid sits between ck1 and ck2, and that sample_req precedes every
// rise of ck1, one sample every SAMPLE_CYCLES cycles.
module tb_clock_gen_2ph;
  localparam int SC = 8;
  logic clk = 0, rst_n = 0;
  logic ck1, ck2, y_valid, sample_req;
  logic ck1_d, ck2_d, req_d;
  int checks = 0, failures = 0;
  int cyc = 0, last_rise = -1, ck1_len = 0, periods = 0;

  clock_gen_2ph #(.SAMPLE_CYCLES(SC)) dut (
    .clk(clk), .rst_n(rst_n), .ck1(ck1), .ck2(ck2),
    .y_valid(y_valid), .sample_req(sample_req)
  );

  always #5 clk = ~clk;

  task automatic expect_true(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 expect_true(!ck1 && !ck2 && sample_req, "reset state");
    rst_n = 1;
    ck1_d = 0; ck2_d = 0; req_d = 1;
    repeat (SC * 50) begin
      @(posedge clk); #1;
      cyc++;
      expect_true(!(ck1 && ck2), "phases overlap");
      expect_true(!(ck1_d && ck2) && !(ck2_d && ck1), "no idle cycle between phases");
      if (ck1 && !ck1_d) begin
        expect_true(req_d, "ck1 rise not preceded by sample_req");
        if (last_rise >= 0) expect_true(cyc - last_rise == SC, "sample period");
        last_rise = cyc;
        periods++;
        ck1_len = 0;
      end
      if (ck1) ck1_len++;
      if (!ck1 && ck1_d) begin
        expect_true(ck1_len == SC - 3, "ck1 length");
        expect_true(y_valid, "y_valid right after ck1");
      end
      if (ck2) expect_true(!ck2_d, "ck2 longer than one cycle");
      if (y_valid) expect_true(!ck1 && !ck2, "y_valid during a phase");
      ck1_d = ck1; ck2_d = ck2; req_d = sample_req;
    end
    expect_true(periods >= 49, "number of sample periods");
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
