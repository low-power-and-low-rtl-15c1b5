// booth_multiplier_tb: exhaustive 8 x 8 check of the radix-4 Booth multiplier.
//
// Every signed multiplicand (-128..127) times every unsigned multiplier
// (0..255) is compared with the integer product. A second instance with a
// 9-bit multiplicand and a 7-bit (odd) multiplier, the shape used behind a
// pre-adder and the odd-width padding case, is checked on random operands.
module booth_multiplier_tb;

  logic signed [7:0]  x;
  logic        [7:0]  y;
  logic signed [16:0] p;
  logic signed [8:0]  x9;
  logic        [6:0]  y7;
  logic signed [16:0] p9;
  int checks = 0, failures = 0;

  booth_multiplier #(.XW(8), .YW(8)) dut  (.x(x),  .y(y),  .p(p));
  booth_multiplier #(.XW(9), .YW(7)) dut9 (.x(x9), .y(y7), .p(p9));

  initial begin
    for (int a = -128; a < 128; a++) begin
      for (int b = 0; b < 256; b++) begin
        x = 8'(a); y = 8'(b);
        #1;
        checks++;
        if (int'(p) != a * b) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", a, b, p);
        end
      end
    end
    for (int i = 0; i < 5000; i++) begin
      int a, b;
      a = int'($urandom_range(511)) - 256;
      b = int'($urandom_range(127));
      x9 = 9'(a); y7 = 7'(b);
      #1;
      checks++;
      if (int'(p9) != a * b) begin
        failures++;
        if (failures < 10) $display("FAIL 9x7 %0d * %0d = %0d", a, b, p9);
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
