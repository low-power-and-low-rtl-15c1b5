// shift_add_fir_tb: fixed-coefficient shift-add FIR against a convolution model.
//
// The default coefficients (1,3,6,15,15,6,3,1 quarters) are restated here
// as the model's impulse response; outputs carry two fractional bits, so the
// model compares 4*y[n] in integer form. y_valid must follow each sample by
// one cycle. Random signed samples with random gaps.
module shift_add_fir_tb;
  localparam int N = 8;
  localparam int H [N] = '{1, 3, 6, 15, 15, 6, 3, 1};   // h[k] * 4

  logic              clk = 0, rst_n = 0, x_valid = 0;
  logic signed [7:0] x = '0;
  logic              y_valid;
  logic signed [18:0] y;
  int checks = 0, failures = 0, cyc = 0;

  shift_add_fir dut (.clk, .rst_n, .x_valid, .x, .y_valid, .y);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  int hist [N];
  int exp_q[$], due_q[$];

  always @(posedge clk) if (rst_n) begin
    if (x_valid) begin
      int acc;
      for (int k = N-1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = int'(x);
      acc = 0;
      for (int k = 0; k < N; k++) acc += hist[k] * H[k];
      exp_q.push_back(acc);
      due_q.push_back(cyc + 1);
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
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      x_valid = ($urandom_range(3) != 0);
      case ($urandom_range(7))
        0: x = -8'sd128;
        1: x = 8'sd127;
        default: x = 8'($urandom);
      endcase
    end
    @(negedge clk); x_valid = 0;
    repeat (4) @(negedge clk);
    if (exp_q.size() != 0) begin failures++; $display("FAIL outputs missing"); end
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
