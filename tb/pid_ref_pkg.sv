// pid_ref_pkg: integer reference arithmetic for the PID controller
// testbenches, written directly from the controller's equations rather than
// from its circuit.
//   Y_P = E_P*e / 2^kP, Y_I = clamp16(sum E_I*e) / 2^kI,
//   Y_D = wrap16(E_D*e(n) - E_D*e(n-1)) / 2^kD, Y = Y_P + Y_I + Y_D,
// every channel value returned as an integer scaled by 256 (8 fractional
// bits), which is how the hardware words read as integers.
package pid_ref_pkg;

  // value / 2^k with 8 fractional bits kept: value * 2^(8-k)
  function automatic longint scaled(longint value, int k);
    return value * (longint'(1) << (8 - k));
  endfunction

  function automatic longint clamp16(longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic longint wrap16(longint v);
    longint w;
    w = v & 64'hFFFF;
    if (w >= 32768) w -= 65536;
    return w;
  endfunction

  // index of the single set bit of a one-hot select (-1 if none)
  function automatic int sel_index(logic [8:0] d);
    for (int k = 0; k <= 8; k++) if (d == (9'd1 << k)) return k;
    return -1;
  endfunction

  // sign-extend an n-bit word read from the design to a longint
  function automatic longint sext(logic [63:0] v, int n);
    longint r;
    r = longint'(v & ((64'd1 << n) - 1));
    if (v[n-1]) r -= (longint'(1) << n);
    return r;
  endfunction

endpackage
