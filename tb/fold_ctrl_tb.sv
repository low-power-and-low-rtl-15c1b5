// fold_ctrl_tb: step sequencer against a reference counter.
//
// With STEPS = 4 and random offers, a model tracks when a word is taken and
// which step must follow. Checked every cycle: x_ready, step, first and last
// against the model. Words taken, steps and refused offers are counted, and
// a back-to-back take during the last step must happen.
module fold_ctrl_tb;
  localparam int STEPS = 4;

  logic       clk = 0, rst_n = 0, x_valid = 0;
  logic       x_ready, accept, busy, first, last;
  logic [1:0] step;
  int checks = 0, failures = 0, m_step = -1, takes = 0, chained = 0;

  fold_ctrl #(.STEPS(STEPS)) dut (.clk, .rst_n, .x_valid, .x_ready, .accept,
                                  .busy, .step, .first, .last);

  always #5 clk = ~clk;

  // m_step: -1 idle, else current step
  always @(posedge clk) if (rst_n) begin
    logic e_busy, e_ready;
    e_busy  = (m_step >= 0);
    e_ready = !e_busy || (m_step == STEPS-1);
    checks++;
    if (busy != e_busy || x_ready != e_ready || accept != (x_valid && e_ready) ||
        (e_busy && (int'(step) != m_step)) ||
        first != (m_step == 0) || last != (m_step == STEPS-1)) begin
      failures++;
      if (failures < 10)
        $display("FAIL model step %0d: busy=%b step=%0d ready=%b first=%b last=%b",
                 m_step, busy, step, x_ready, first, last);
    end
    if (x_valid && e_ready) begin
      takes++;
      if (m_step == STEPS-1) chained++;
      m_step = 0;
    end else if (m_step == STEPS-1) m_step = -1;
    else if (m_step >= 0) m_step++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      x_valid = (i < 200) ? 1'b1 : ($urandom_range(3) == 0);
    end
    checks++;
    if (takes < 50 || chained < 20) begin
      failures++; $display("FAIL takes=%0d chained=%0d", takes, chained);
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
