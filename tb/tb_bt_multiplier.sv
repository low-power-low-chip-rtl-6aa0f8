// tb_bt_multiplier: exhaustive check of the 8x8 binary-tree multiplier,
// every signed error value against every unsigned coefficient (65536 cases),
// compared with integer multiplication. Two further instances check other
// sizes, 5x3 (exhaustive, numerator width not a power of two) and 10x6.
module tb_bt_multiplier;
  logic [7:0] e, k;
  logic [15:0] p;
  logic [4:0] e5;
  logic [2:0] k3;
  logic [7:0] p53;
  logic [9:0] e10;
  logic [5:0] k6;
  logic [15:0] p106;
  int checks = 0, failures = 0;

  bt_multiplier dut (.e(e), .k(k), .p(p));
  bt_multiplier #(.N1(5), .N2(3)) dut53 (.e(e5), .k(k3), .p(p53));
  bt_multiplier #(.N1(10), .N2(6)) dut106 (.e(e10), .k(k6), .p(p106));

  initial begin
    for (int ei = -128; ei < 128; ei++) begin
      for (int ki = 0; ki < 256; ki++) begin
        int exp;
        e = 8'(ei); k = 8'(ki);
        #1;
        exp = ei * ki;
        checks++;
        if ($signed(p) != exp) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d: got %0d", ei, ki, $signed(p));
        end
      end
    end
    for (int ei = -16; ei < 16; ei++) begin
      for (int ki = 0; ki < 8; ki++) begin
        e5 = 5'(ei); k3 = 3'(ki);
        #1;
        checks++;
        if (int'($signed(p53)) != ei * ki) begin
          failures++;
          $display("FAIL 5x3 %0d * %0d: got %0d", ei, ki, $signed(p53));
        end
      end
    end
    for (int n = 0; n < 5000; n++) begin
      int ei, ki;
      ei = int'($urandom_range(0, 1023)) - 512;
      ki = int'($urandom_range(0, 63));
      e10 = 10'(ei); k6 = 6'(ki);
      #1;
      checks++;
      if (int'($signed(p106)) != ei * ki) begin
        failures++;
        if (failures < 10) $display("FAIL 10x6 %0d * %0d: got %0d", ei, ki, $signed(p106));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
