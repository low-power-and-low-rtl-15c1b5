// serial_adder_tb: bit-serial adder on random 12-bit words sent back to back.
//
// Operands are sent LSB first, `start` on bit 0, with no gap between words;
// the collected sum bits must equal (a + b) mod 2**12. Words whose addition
// produces carries into the next word's time slot check that `start` drops
// the held carry.
module serial_adder_tb;
  localparam int W = 12;

  logic clk = 0, rst_n = 0, start = 0, a = 0, b = 0, s;
  int checks = 0, failures = 0, carry_words = 0;

  serial_adder dut (.clk, .rst_n, .start, .a, .b, .s);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 300; w++) begin
      logic [W-1:0] av, bv, got;
      av = W'($urandom); bv = W'($urandom);
      if (w % 5 == 0) begin av = '1; bv = W'(1); end     // ripples through every bit
      if ({1'b0, av} + {1'b0, bv} >= (1 << W)) carry_words++;
      for (int t = 0; t < W; t++) begin
        start = (t == 0); a = av[t]; b = bv[t];
        #1;
        got[t] = s;
        @(negedge clk);
      end
      checks++;
      if (got != W'(av + bv)) begin
        failures++;
        if (failures < 10) $display("FAIL %h + %h -> %h", av, bv, got);
      end
    end
    checks++;
    if (carry_words == 0) begin failures++; $display("FAIL no carry-out word"); end
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
