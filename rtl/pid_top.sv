// pid_top: programmable discrete-time PID controller,
//   Y(n) = e(n)*K_P + sum_{m<=n} e(m)*K_I + (e(n) - e(n-1))*K_D,
// with each coefficient K = E / D, E an unsigned 8-bit numerator and D = 2^k,
// k = 0..8 (so K ranges from 1/256 to 255).
//
// Three channels work in parallel on the same error sample e(n): the P
// channel (multiply, shift), the I channel (multiply, accumulate with
// overflow clamp, shift) and the D channel (multiply, subtract the previous
// product, shift). Each channel output has 24 bits, 8 of them fractional, so
// the integer value of a channel word is the exact quotient times 256. The
// output stage adds P and I in a 24-bit multi-bit adder whose carry gives a
// 25-bit sum, then adds the sign-extended D result in a 25-bit adder giving
// the 26-bit output y (again 8 fractional bits). Dividing y by a further 2^8
// reads the coefficients as E/D/256, normalised to at most 1.
//
// Everything between the error input and y is combinational; the only
// storage is the two delay lines (latch pairs) of the I and D channels,
// driven by the two-phase clock generator:
//   - apply e(n) at the master clock edge that ends a sample_req cycle,
//     hold it until ck1 has fallen, and keep cfg stable;
//   - y, y_p, y_i, y_d are valid in the y_valid cycle (after ck1, before ck2);
//   - one sample is taken every SAMPLE_CYCLES master clock cycles.
// rst_n (synchronous for the clock generator, asynchronous for the delay
// lines) clears the integrator and the stored D-channel product.
//
// The channel structure, the widths (16-bit products, 24-bit shift outputs,
// 25- and 26-bit sums) and the two-phase delay lines follow the design
// description. The master-clock based phase generator, the saturation rule of
// the overflow block, the reset, and the handshake outputs are this design's
// own choices.
//
// Lint tools report the integrator's feedback path (and i_ovf, which hangs
// off it) as a combinational loop; it is broken by the delay line's two
// latches, which ck1 and ck2 never open together.
module pid_top
  import pid_pkg::*;
#(
  parameter int unsigned SAMPLE_CYCLES = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [E_W-1:0]    e,          // error sample, two's complement
  input  pid_cfg_t          cfg,        // numerators and one-hot divisors
  output logic [CH_W+1:0]   y,          // Y_PID, 26 bits, 8 fractional
  output logic [CH_W-1:0]   y_p,        // Y_P, 24 bits, 8 fractional
  output logic [CH_W-1:0]   y_i,        // Y_I
  output logic [CH_W-1:0]   y_d,        // Y_D
  output logic              i_ovf,      // I-channel clamp active
  output logic              ck1,
  output logic              ck2,
  output logic              y_valid,
  output logic              sample_req
);
  clock_gen_2ph #(.SAMPLE_CYCLES(SAMPLE_CYCLES)) u_clk (
    .clk(clk), .rst_n(rst_n), .ck1(ck1), .ck2(ck2),
    .y_valid(y_valid), .sample_req(sample_req)
  );

  p_channel #(.N1(E_W), .N2(K_W), .NSH(NSH)) u_p (
    .e(e), .k(cfg.e_p), .d(cfg.d_p), .y(y_p)
  );

  i_channel #(.N1(E_W), .N2(K_W), .NSH(NSH)) u_i (
    .rst_n(rst_n), .ck1(ck1), .ck2(ck2),
    .e(e), .k(cfg.e_i), .d(cfg.d_i), .y(y_i), .ovf(i_ovf)
  );

  d_channel #(.N1(E_W), .N2(K_W), .NSH(NSH)) u_d (
    .rst_n(rst_n), .ck1(ck1), .ck2(ck2),
    .e(e), .k(cfg.e_d), .d(cfg.d_d), .y(y_d)
  );

  // Output stage. Sign extension of a two's complement sum by one bit:
  // top bit = sign(a) ^ sign(b) ^ carry out.
  logic [CH_W-1:0] pi_low;
  logic            pi_cout;
  logic [CH_W:0]   pi_sum, d_ext;
  logic [CH_W:0]   out_low;
  logic            out_cout;

  mbfa #(.W(CH_W)) u_add_pi (
    .a(y_p), .b(y_i), .cin(1'b0), .s(pi_low), .cout(pi_cout)
  );
  assign pi_sum = {y_p[CH_W-1] ^ y_i[CH_W-1] ^ pi_cout, pi_low};
  assign d_ext  = {y_d[CH_W-1], y_d};

  mbfa #(.W(CH_W+1)) u_add_out (
    .a(pi_sum), .b(d_ext), .cin(1'b0), .s(out_low), .cout(out_cout)
  );
  assign y = {pi_sum[CH_W] ^ d_ext[CH_W] ^ out_cout, out_low};
endmodule
