// mac_fir_booth_tb: transversal Booth FIR against a convolution model.
//
// Random 8-bit signed samples (including the extreme values) stream in with
// random gaps; each accepted sample's expected output, the convolution of
// the sample history with the coefficients, is queued and compared when
// y_valid comes. y_valid must come exactly one cycle after its sample.
// The coefficients are changed twice during the run.
module mac_fir_booth_tb;
  localparam int N = 8;

  logic              clk = 0, rst_n = 0, x_valid = 0;
  logic signed [7:0] x = '0;
  logic        [7:0] coef [N];
  logic              y_valid;
  logic signed [19:0] y;
  int checks = 0, failures = 0, cyc = 0;

  mac_fir_booth dut (.clk, .rst_n, .x_valid, .x, .coef, .y_valid, .y);

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
      for (int k = 0; k < N; k++) acc += hist[k] * int'(coef[k]);
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
    for (int k = 0; k < N; k++) begin hist[k] = 0; coef[k] = 8'($urandom); end
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
      if (i == 200) for (int k = 0; k < N; k++) coef[k] = 8'hff;
      if (i == 400) for (int k = 0; k < N; k++) coef[k] = 8'($urandom);
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
