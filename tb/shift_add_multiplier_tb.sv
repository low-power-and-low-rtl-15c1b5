// shift_add_multiplier_tb: constant multipliers against integer products.
//
// The default instance multiplies by 3.75 (15 quarters): every 8-bit signed
// sample must give exactly 15*x, i.e. x*3.75 with two fractional bits.
// Two more instances with other constants (0xA5 and 0x80) cover sparse
// and single-term coefficients.
module shift_add_multiplier_tb;
  logic signed [7:0]  x;
  logic signed [15:0] p, pa, pb;
  int checks = 0, failures = 0;

  shift_add_multiplier dut (.x(x), .p(p));
  shift_add_multiplier #(.COEF(8'hA5)) dut_a (.x(x), .p(pa));
  shift_add_multiplier #(.COEF(8'h80)) dut_b (.x(x), .p(pb));

  initial begin
    for (int v = -128; v < 128; v++) begin
      x = 8'(v);
      #1;
      checks += 3;
      if (int'(p) != v * 15)    begin failures++; $display("FAIL %0d*3.75 -> %0d", v, p); end
      if (int'(pa) != v * 165)  begin failures++; $display("FAIL %0d*165 -> %0d", v, pa); end
      if (int'(pb) != v * 128)  begin failures++; $display("FAIL %0d*128 -> %0d", v, pb); end
      if (failures > 10) break;
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
