// shift_add_fir: transversal FIR filter with fixed coefficients and shift-add multipliers.
//
//   y[n] = sum_{k=0}^{NTAP-1} h[k] * x[n-k],   h[k] = COEFS[k] / 2**FRAC
//
// The coefficients are constants of the design, so every tap multiplier is a
// shift_add_multiplier: only the powers of two present in the coefficient
// appear as adders. A tapped delay line and an adder chain complete the
// transversal filter. y is exact and carries FRAC fractional bits.
// Timing as in mac_fir_booth: y_valid one cycle after each sample.
// The default coefficient set is a symmetric low-pass shape in steps of
// 1/4 chosen for this design (it includes the 3.75 example); the filter
// structure and the shift-add multipliers follow the published design.
module shift_add_fir
  import fir_pkg::*;
#(
  parameter int unsigned DW   = fir_pkg::DATA_W,
  parameter int unsigned CW   = fir_pkg::COEF_W,
  parameter int unsigned NTAP = fir_pkg::TAPS,
  parameter int unsigned FRAC = 2,
  parameter int unsigned COEFS [NTAP] = '{1, 3, 6, 15, 15, 6, 3, 1},
  localparam int unsigned PW  = DW + CW,
  localparam int unsigned YW  = PW + clog2_min1(NTAP)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 x_valid,
  input  logic signed [DW-1:0] x,
  output logic                 y_valid,
  output logic signed [YW-1:0] y          // FRAC fractional bits
);

  logic signed [DW-1:0] tap  [NTAP];
  logic signed [DW-1:0] dly  [1:NTAP-1];
  logic signed [PW-1:0] prod [NTAP];
  logic signed [YW-1:0] acc  [NTAP];

  assign tap[0] = x;
  for (genvar k = 1; k < NTAP; k++) begin : g_tap
    assign tap[k] = dly[k];
  end

  for (genvar k = 0; k < NTAP; k++) begin : g_mul
    shift_add_multiplier #(.XW(DW), .CW(CW), .COEF(COEFS[k]), .FRAC(FRAC)) u_mul (
      .x (tap[k]),
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
