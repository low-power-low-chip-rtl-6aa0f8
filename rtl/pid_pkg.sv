// pid_pkg: widths and the programming word shared by the PID controller.
//
// The controller multiplies an 8-bit two's complement error sample by three
// unsigned 8-bit coefficient numerators E_P, E_I, E_D and divides each product
// by a power of two D = 2^k, k = 0..8, chosen by a one-hot select d[8:0]
// (d[0] = no division, d[8] = divide by 256). These widths follow the design
// description; packing them into one configuration struct is this design's
// own choice.
package pid_pkg;

  localparam int unsigned E_W   = 8;   // error sample width (n1)
  localparam int unsigned K_W   = 8;   // coefficient numerator width (n2)
  localparam int unsigned NSH   = 8;   // largest right shift of a shift block
  localparam int unsigned PROD_W = E_W + K_W;   // product width, 16
  localparam int unsigned CH_W   = PROD_W + NSH; // channel output width, 24

  typedef logic [NSH:0] shift_sel_t;   // one-hot, bit k divides by 2^k

  // Programming word: numerator and one-hot divisor of each channel.
  typedef struct packed {
    logic [K_W-1:0] e_p;
    logic [K_W-1:0] e_i;
    logic [K_W-1:0] e_d;
    shift_sel_t     d_p;
    shift_sel_t     d_i;
    shift_sel_t     d_d;
  } pid_cfg_t;

  // One-hot divisor select for a right shift of k positions.
  function automatic shift_sel_t shift_sel(input int unsigned k);
    return shift_sel_t'(1) << k;
  endfunction

endpackage
