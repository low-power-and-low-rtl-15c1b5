// fold_ctrl: step sequencer for time-multiplexed (folded or bit-serial) datapaths.
//
// A new input word is accepted when x_valid and x_ready are both high
// (`accept`). The datapath then works on it for STEPS consecutive cycles;
// `step` counts 0..STEPS-1, `first` marks step 0 (clear the accumulator,
// restart serial carries) and `last` marks step STEPS-1 (close the result).
// x_ready is high when idle and also during the last step, so a continuous
// stream is taken at one word every STEPS cycles with no gap.
// In the folded filter `step` drives the two tap multiplexer selects
// (Sel1/Sel2) and the coefficient choice C[n]; in the bit-serial filter it
// counts bit times. The handshake itself is this design's choice.
module fold_ctrl #(
  parameter int unsigned STEPS = 4,
  localparam int unsigned SW   = (STEPS <= 2) ? 1 : $clog2(STEPS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          x_valid,
  output logic          x_ready,
  output logic          accept,
  output logic          busy,
  output logic [SW-1:0] step,
  output logic          first,
  output logic          last
);

  assign first   = busy && (step == '0);
  assign last    = busy && (step == SW'(STEPS - 1));
  assign x_ready = !busy || last;
  assign accept  = x_valid && x_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      step <= '0;
    end else if (accept) begin
      busy <= 1'b1;
      step <= '0;
    end else if (last) begin
      busy <= 1'b0;
      step <= '0;
    end else if (busy) begin
      step <= step + 1'b1;
    end
  end

  // A step count is only meaningful while busy.
  a_step_range: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (int'(step) < int'(STEPS)));

endmodule
