// folded_lp_fir_tb: folded linear-phase FIR against a convolution model.
//
// Samples are offered with random gaps and also back to back; one is taken
// only when x_valid and x_ready are both high. The model convolves the
// taken samples with the symmetric 8-tap response built from the four
// coefficients. Each output must arrive exactly L+1 = 5 cycles after its
// sample was taken, and a continuous stream must be taken at exactly one
// sample every 4 cycles. Offers refused by x_ready are counted.
module folded_lp_fir_tb;
  localparam int N = 8, L = 4;

  logic              clk = 0, rst_n = 0, x_valid = 0, x_ready;
  logic signed [7:0] x = '0;
  logic        [7:0] coef [L];
  logic              y_valid;
  logic signed [19:0] y;
  int checks = 0, failures = 0, cyc = 0, stalls = 0, last_take = -100, b2b = 0;

  folded_lp_fir dut (.clk, .rst_n, .x_valid, .x_ready, .x, .coef, .y_valid, .y);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  int hist [N];
  int exp_q[$], due_q[$];

  function automatic int h(int k);
    return int'(coef[(k < L) ? k : N-1-k]);
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (x_valid && !x_ready) stalls++;
    if (x_valid && x_ready) begin
      int acc;
      if (cyc - last_take < L) begin
        failures++; $display("FAIL sample taken %0d cycles after the previous", cyc - last_take);
      end
      if (cyc - last_take == L) b2b++;
      last_take = cyc;
      for (int k = N-1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = int'(x);
      acc = 0;
      for (int k = 0; k < N; k++) acc += hist[k] * h(k);
      exp_q.push_back(acc);
      due_q.push_back(cyc + L + 1);
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
    for (int k = 0; k < L; k++) coef[k] = 8'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // first half: offer every cycle (continuous stream); then random
      if (!x_valid || x_ready) begin
        x_valid = (i < 1000) ? 1'b1 : ($urandom_range(2) == 0);
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
    repeat (10) @(negedge clk);
    if (exp_q.size() != 0) begin failures++; $display("FAIL outputs missing"); end
    checks++;
    if (stalls == 0 || b2b < 100) begin
      failures++; $display("FAIL stalls=%0d back-to-back=%0d", stalls, b2b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
