// fir_sizes_tb: the programmable filters at 4 and at 16 taps.
//
// Runs fir_size_check twice, with NTAP = 4 (folded filter with 2 steps,
// serial frame of 8+8+2 bits) and NTAP = 16 (8 steps, 8:1 tap multiplexers,
// frame of 20 bits), to show the tap count is a working parameter. Each
// instance compares every output with its own convolution model.
module fir_sizes_tb;
  logic clk = 0, rst_n = 0;
  logic d4, d16;
  int c4, f4, c16, f16;
  int checks, failures;

  always #5 clk = ~clk;

  fir_size_check #(.NTAP(4))  u4  (.clk, .rst_n, .done(d4),  .checks(c4),  .failures(f4));
  fir_size_check #(.NTAP(16)) u16 (.clk, .rst_n, .done(d16), .checks(c16), .failures(f16));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (d4 && d16);
    repeat (3) @(negedge clk);
    checks = c4 + c16; failures = f4 + f16;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c16, f4 + f16 + 1);
    $finish;
  end
endmodule
