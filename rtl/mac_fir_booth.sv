// mac_fir_booth: transversal (direct-form) FIR filter with radix-4 Booth multipliers.
//
//   y[n] = sum_{k=0}^{TAPS-1} f[k] * x[n-k]
//
// A tapped delay line holds the last TAPS-1 samples; the newest sample x[n]
// feeds tap 0 directly. Every tap has its own Booth multiplier (sample as the
// signed multiplicand, coefficient as the unsigned recoded operand) and the
// products are summed by a chain of adders, as in the transversal structure.
// Timing: when x_valid is high the delay line shifts and y takes the new
// output at the same clock edge, so y_valid pulses one cycle after the
// sample, one output per sample, one sample per cycle at most. The output
// register and the full-precision width of y are this design's choices.
// Coefficients are inputs and may be changed between samples.
module mac_fir_booth
  import fir_pkg::*;
#(
  parameter int unsigned DW   = fir_pkg::DATA_W,
  parameter int unsigned CW   = fir_pkg::COEF_W,
  parameter int unsigned NTAP = fir_pkg::TAPS,
  localparam int unsigned PW  = DW + CW + 1,
  localparam int unsigned YW  = PW + clog2_min1(NTAP)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 x_valid,
  input  logic signed [DW-1:0] x,
  input  logic        [CW-1:0] coef [NTAP],   // f[0] .. f[NTAP-1]
  output logic                 y_valid,
  output logic signed [YW-1:0] y
);

  logic signed [DW-1:0] tap  [NTAP];   // tap[k] = x[n-k]
  logic signed [DW-1:0] dly  [1:NTAP-1];
  logic signed [PW-1:0] prod [NTAP];
  logic signed [YW-1:0] acc  [NTAP];   // running sums along the adder chain

  assign tap[0] = x;
  for (genvar k = 1; k < NTAP; k++) begin : g_tap
    assign tap[k] = dly[k];
  end

  for (genvar k = 0; k < NTAP; k++) begin : g_mul
    booth_multiplier #(.XW(DW), .YW(CW)) u_mul (
      .x (tap[k]),
      .y (coef[k]),
      .p (prod[k])
    );
  end

  always_comb begin
    acc[0] = YW'(prod[0]);
    for (int k = 1; k < NTAP; k++) acc[k] = acc[k-1] + YW'(prod[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < NTAP; k++) dly[k] <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= x_valid;
      if (x_valid) begin
        dly[1] <= x;
        for (int k = 2; k < NTAP; k++) dly[k] <= dly[k-1];
        y <= acc[NTAP-1];
      end
    end
  end

endmodule
