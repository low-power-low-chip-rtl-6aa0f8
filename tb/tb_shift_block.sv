// tb_shift_block: checks the dividing block for every one-hot select: the
// 24-bit output read as an integer must equal input * 2^(8-k), which places
// the input at o[23:8] for k = 0 and at o[15:0] for k = 8, zero below and the
// sign above. Also checks that an all-zero select gives 0.
module tb_shift_block;
  import pid_ref_pkg::*;
  logic [15:0] i;
  logic [8:0]  d;
  logic [23:0] o;
  int checks = 0, failures = 0;

  shift_block dut (.i(i), .d(d), .o(o));

  task automatic check(logic [15:0] ti, int k);
    longint exp;
    i = ti; d = 9'd1 << k;
    #1;
    exp = scaled(sext(64'(ti), 16), k);
    checks++;
    if (sext(64'(o), 24) != exp) begin
      failures++;
      $display("FAIL i=%h k=%0d: got %h expected %0d", ti, k, o, exp);
    end
  endtask

  initial begin
    // placement examples: no shift and shift by 8
    i = 16'hA5C3; d = 9'b0_0000_0001; #1;
    checks++; if (o !== 24'hA5C3_00) begin failures++; $display("FAIL d0 placement %h", o); end
    d = 9'b1_0000_0000; #1;
    checks++; if (o !== 24'hFF_A5C3) begin failures++; $display("FAIL d8 placement %h", o); end
    i = 16'h25C3; #1;
    checks++; if (o !== 24'h00_25C3) begin failures++; $display("FAIL d8 positive %h", o); end
    d = '0; #1;
    checks++; if (o !== '0) begin failures++; $display("FAIL empty select %h", o); end
    for (int k = 0; k <= 8; k++) begin
      check(16'h0000, k); check(16'h7FFF, k); check(16'h8000, k); check(16'hFFFF, k);
      for (int n = 0; n < 300; n++) check(16'($urandom), k);
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
