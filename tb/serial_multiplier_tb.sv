// serial_multiplier_tb: bit-serial multiplier, 4-bit coefficient, back-to-back words.
//
// For each word a random unsigned 4-bit coefficient a, a random signed 8-bit
// b (sign-extended over the 12-bit frame) and a random 12-bit serial addend
// z are sent LSB first, `start` on bit 0. The 12 output bits must equal
// (z + a*b) mod 2**12, the exact signed result. The output must appear in
// the same cycle as the input bit (no latency).
module serial_multiplier_tb;
  localparam int W = 4, F = 12;

  logic         clk = 0, rst_n = 0, start = 0, b = 0, z = 0, p;
  logic [W-1:0] a = '0;
  int checks = 0, failures = 0;

  serial_multiplier dut (.clk, .rst_n, .start, .a, .b, .z, .p);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 400; w++) begin
      logic signed [7:0] bv;
      logic [F-1:0] be, zv, got, expv;
      bv = 8'($urandom);
      a  = W'($urandom);
      if (w < 4) begin bv = -8'sd128; a = '1; end
      zv = (w % 2) ? F'($urandom) : '0;
      be = F'(bv);                        // sign-extended
      expv = F'(int'(zv) + int'(a) * int'(bv));
      for (int t = 0; t < F; t++) begin
        start = (t == 0); b = be[t]; z = zv[t];
        #1;
        got[t] = p;
        @(negedge clk);
      end
      checks++;
      if (got != expv) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d z=%h -> %h exp %h", a, bv, zv, got, expv);
      end
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
