// full_adder: one-bit full adder (1BFA), the cell every adder, subtractor and
// multiplier of the PID controller is built from.
//
// Purely combinational: s = a ^ b ^ cin, cout = majority(a, b, cin).
// Lint tools may report this cell as part of a combinational loop when it
// sits in the integral channel's accumulator: that loop is closed through the
// two latches of a delay line, which are never open together, so it is not a
// real combinational loop.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  always_comb begin
    s    = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
