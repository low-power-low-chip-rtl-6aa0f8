// tb_pid_top: end-to-end test of the PID controller at its default size.
//
// Part 1 runs two periods of a 36-sample triangular error (0 up to 9, down
// to -9, back to 0, steps of 1) with K_P = 91/256, K_I = 127/256 and
// K_D = 80/256 (numerators 91, 127, 80, every divisor 256). Part 2
// reprograms the controller every 40 samples with random numerators and
// divisors, alternating random errors with long runs of large positive or
// negative errors that drive the integrator into both clamps.
//
// Every sample is applied at the edge that ends a sample_req cycle and all
// outputs (Y_P, Y_I, Y_D, Y and the clamp flag) are compared in the y_valid
// cycle with an integer model of the controller equations. The test also
// checks the sample period of SAMPLE_CYCLES master cycles, the triangle's
// peak channel values (91*9 for P, 127*81 for I, in units of 1/256), and
// counts how often each mechanism occurred: positive and negative
// integrator clamp, every divisor setting in every channel, a negative
// derivative, a reprogramming and a reset of the history. A mechanism
// that never occurred counts as a failure.
module tb_pid_top;
  import pid_pkg::*;
  import pid_ref_pkg::*;

  localparam int SC = 8;   // default SAMPLE_CYCLES of pid_top

  logic clk = 0, rst_n = 0;
  logic [7:0] e = '0;
  pid_cfg_t cfg;
  logic [25:0] y;
  logic [23:0] y_p, y_i, y_d;
  logic i_ovf, ck1, ck2, y_valid, sample_req;

  int checks = 0, failures = 0;
  int n_sat_pos = 0, n_sat_neg = 0, n_dneg = 0, n_reprog = 0, n_reset = 0;
  int n_shift [3][9];
  longint acc = 0, prev_prod = 0;
  longint max_p = 0, max_i = 0;
  int cyc = 0, last_sample_cyc = -1;

  pid_top dut (
    .clk(clk), .rst_n(rst_n), .e(e), .cfg(cfg), .y(y), .y_p(y_p), .y_i(y_i),
    .y_d(y_d), .i_ovf(i_ovf), .ck1(ck1), .ck2(ck2), .y_valid(y_valid),
    .sample_req(sample_req)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic expect_eq(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, exp, cyc);
    end
  endtask

  // Apply one error sample, wait for the result and check it.
  task automatic run_sample(int ei);
    longint prod_i, prod_d, exact, ep, ei_, ed;
    int kp, ki, kd;
    while (!sample_req) begin
      @(posedge clk);
      #1;
    end
    @(posedge clk);
    e <= 8'(ei);
    #1 expect_eq(longint'(ck1), 1, "ck1 rises with the new sample");
    if (last_sample_cyc >= 0) expect_eq(cyc - last_sample_cyc, SC, "sample period");
    last_sample_cyc = cyc;
    do begin
      @(posedge clk);
      #1;
    end while (!y_valid);
    kp = sel_index(cfg.d_p); ki = sel_index(cfg.d_i); kd = sel_index(cfg.d_d);
    ep = scaled(longint'(ei) * cfg.e_p, kp);
    prod_i = longint'(ei) * cfg.e_i;
    exact = acc + prod_i;
    acc = clamp16(exact);
    ei_ = scaled(acc, ki);
    prod_d = longint'(ei) * cfg.e_d;
    ed = scaled(wrap16(prod_d - prev_prod), kd);
    prev_prod = prod_d;
    expect_eq(sext(64'(y_p), 24), ep, "Y_P");
    expect_eq(sext(64'(y_i), 24), ei_, "Y_I");
    expect_eq(sext(64'(y_d), 24), ed, "Y_D");
    expect_eq(sext(64'(y), 26), ep + ei_ + ed, "Y");
    expect_eq(longint'(i_ovf), longint'(exact != acc), "clamp flag");
    if (exact > 32767) n_sat_pos++;
    if (exact < -32768) n_sat_neg++;
    if (ed < 0) n_dneg++;
    n_shift[0][kp]++; n_shift[1][ki]++; n_shift[2][kd]++;
    if (ep > max_p) max_p = ep;
    if (ei_ > max_i) max_i = ei_;
  endtask

  task automatic do_reset();
    rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    acc = 0; prev_prod = 0; last_sample_cyc = -1;
  endtask

  initial begin
    foreach (n_shift[c, k]) n_shift[c][k] = 0;
    cfg = '{e_p: 8'd91, e_i: 8'd127, e_d: 8'd80,
            d_p: shift_sel(8), d_i: shift_sel(8), d_d: shift_sel(8)};
    do_reset();

    // Part 1: triangular error, two periods of 36 samples
    for (int period = 0; period < 2; period++) begin
      for (int n = 0; n < 36; n++) begin
        int v;
        if (n <= 9)       v = n;          // 0 .. 9
        else if (n <= 27) v = 18 - n;     // 8 .. -9
        else              v = n - 36;     // -8 .. -1
        run_sample(v);
      end
    end
    expect_eq(max_p, 91 * 9, "peak of Y_P");
    expect_eq(max_i, 127 * 81, "peak of Y_I");
    expect_eq(acc, 0, "integrator back to 0 after whole periods");

    // Part 2: reprogramming, all divisors, clamps
    for (int blk = 0; blk < 45; blk++) begin
      cfg.e_p = 8'($urandom); cfg.e_i = 8'($urandom); cfg.e_d = 8'($urandom);
      cfg.d_p = shift_sel(blk % 9);
      cfg.d_i = shift_sel((blk + 3) % 9);
      cfg.d_d = shift_sel((blk * 2) % 9);
      n_reprog++;
      for (int n = 0; n < 40; n++) begin
        int v;
        case (blk % 3)
          0: v = $signed(8'($urandom));
          1: v = int'($urandom_range(50, 127));
          default: v = -int'($urandom_range(50, 128));
        endcase
        run_sample(v);
      end
      if (blk == 20) begin
        do_reset();
        n_reset++;
        run_sample(1);
      end
    end

    // mechanisms
    expect_eq(longint'(n_sat_pos > 0), 1, "positive clamp occurred");
    expect_eq(longint'(n_sat_neg > 0), 1, "negative clamp occurred");
    expect_eq(longint'(n_dneg > 0), 1, "negative derivative occurred");
    expect_eq(longint'(n_reprog > 0), 1, "reprogramming occurred");
    expect_eq(longint'(n_reset > 0), 1, "reset of the history occurred");
    for (int c = 0; c < 3; c++)
      for (int k = 0; k <= 8; k++)
        expect_eq(longint'(n_shift[c][k] > 0), 1, $sformatf("channel %0d divisor 2^%0d used", c, k));
    $display("mechanisms: clamp+ %0d, clamp- %0d, negative D %0d, reprogram %0d, reset %0d",
             n_sat_pos, n_sat_neg, n_dneg, n_reprog, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
