// serial_mac_fir_tb: bit-serial FIR against a convolution model.
//
// Samples are offered back to back and with random gaps; one is taken only
// when x_valid and x_ready are high. The model convolves the taken samples
// with the eight coefficients. Each output must arrive exactly FW+1 = 20
// cycles after its sample was taken (FW = 19-bit frame), and a continuous
// stream must be taken at exactly one sample every 19 cycles. The
// coefficients include all-ones words so the serial carries run long.
module serial_mac_fir_tb;
  localparam int N = 8, FW = 19;

  logic              clk = 0, rst_n = 0, x_valid = 0, x_ready;
  logic signed [7:0] x = '0;
  logic        [7:0] coef [N];
  logic              y_valid;
  logic signed [18:0] y;
  int checks = 0, failures = 0, cyc = 0, stalls = 0, last_take = -100, b2b = 0;

  serial_mac_fir dut (.clk, .rst_n, .x_valid, .x_ready, .x, .coef, .y_valid, .y);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  int hist [N];
  int exp_q[$], due_q[$];

  function automatic int h(int k);
    return int'(coef[k]);
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (x_valid && !x_ready) stalls++;
    if (x_valid && x_ready) begin
      int acc;
      if (cyc - last_take < FW) begin
        failures++; $display("FAIL sample taken %0d cycles after the previous", cyc - last_take);
      end
      if (cyc - last_take == FW) b2b++;
      last_take = cyc;
      for (int k = N-1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = int'(x);
      acc = 0;
      for (int k = 0; k < N; k++) acc += hist[k] * h(k);
      exp_q.push_back(acc);
      due_q.push_back(cyc + FW + 1);
    end
    if (y_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected y_valid");
      end else begin
        int e, d;
        e = exp_q.pop_front(); d = due_q.pop_front();
        if (int'(y) != e || d != cyc) begin
          failures++;
          if (failures < 10) $display("FAIL y=%0d exp %0d (cycle %0d, due %0d)", y, e, cyc, d);
        end
      end
    end
  end

  initial begin
    for (int k = 0; k < N; k++) hist[k] = 0;
    for (int k = 0; k < N; k++) coef[k] = (k % 3 == 0) ? 8'hff : 8'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      // first half: offer every cycle (continuous stream); then random
      if (!x_valid || x_ready) begin
        x_valid = (i < 3000) ? 1'b1 : ($urandom_range(2) == 0);
        case ($urandom_range(7))
          0: x = -8'sd128;
          1: x = 8'sd127;
          default: x = 8'($urandom);
        endcase
      end
      #1;
      if (x_valid && x_ready) ; // taken at the next edge
    end
    @(negedge clk); x_valid = 0;
    repeat (30) @(negedge clk);
    if (exp_q.size() != 0) begin failures++; $display("FAIL outputs missing"); end
    checks++;
    if (stalls == 0 || b2b < 50) begin
      failures++; $display("FAIL stalls=%0d back-to-back=%0d", stalls, b2b);
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
