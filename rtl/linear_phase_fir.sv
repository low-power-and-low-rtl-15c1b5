// linear_phase_fir: symmetric linear-phase FIR filter with pre-adders.
//
// A linear-phase filter of even length N = 2*L has h[k] = h[N-1-k], so
//   y[n] = sum_{k=0}^{L-1} f[k] * (x[n-k] + x[n-(N-1-k)]).
// The delay line runs forward through L-1 registers (taps x[n]..x[n-L+1]),
// turns through one corner register, and runs back through L-1 registers
// (taps x[n-L]..x[n-N+1]). At each forward position a pre-adder adds the
// sample opposite it on the return line, so L Booth multipliers serve N taps;
// an adder chain sums the products. This is the unfolded form of the
// folded filter (folded_lp_fir).
// Only the symmetric case (+) is built; an antisymmetric filter would need
// subtracting pre-adders. The output register and its timing (y_valid one
// cycle after each accepted sample) are this design's choices.
module linear_phase_fir
  import fir_pkg::*;
#(
  parameter int unsigned DW   = fir_pkg::DATA_W,
  parameter int unsigned CW   = fir_pkg::COEF_W,
  parameter int unsigned NTAP = fir_pkg::TAPS,   // N, even
  localparam int unsigned L   = NTAP / 2,
  localparam int unsigned PW  = DW + 1 + CW + 1,  // pre-added sample times coefficient
  localparam int unsigned YW  = PW + clog2_min1(L)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 x_valid,
  input  logic signed [DW-1:0] x,
  input  logic        [CW-1:0] coef [L],     // f[0] .. f[L-1] = h[0] .. h[L-1]
  output logic                 y_valid,
  output logic signed [YW-1:0] y
);

  logic signed [DW-1:0] fwd  [L];          // fwd[k] = x[n-k]
  logic signed [DW-1:0] fdly [1:L-1];      // forward delay registers
  logic signed [DW-1:0] bwd  [L];          // bwd[j] = x[n-L-j]
  logic signed [DW:0]   pre  [L];
  logic signed [PW-1:0] prod [L];
  logic signed [YW-1:0] acc  [L];

  assign fwd[0] = x;
  for (genvar k = 1; k < L; k++) begin : g_fwd
    assign fwd[k] = fdly[k];
  end

  for (genvar k = 0; k < L; k++) begin : g_tap
    assign pre[k] = (DW+1)'(fwd[k]) + (DW+1)'(bwd[L-1-k]);
    booth_multiplier #(.XW(DW+1), .YW(CW)) u_mul (
      .x (pre[k]),
      .y (coef[k]),
      .p (prod[k])
    );
  end

  always_comb begin
    acc[0] = YW'(prod[0]);
    for (int k = 1; k < L; k++) acc[k] = acc[k-1] + YW'(prod[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < L; k++) fdly[k] <= '0;
      for (int j = 0; j < L; j++) bwd[j]  <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= x_valid;
      if (x_valid) begin
        if (L > 1) fdly[1] <= x;
        for (int k = 2; k < L; k++) fdly[k] <= fdly[k-1];
        bwd[0] <= fwd[L-1];                          // corner register
        for (int j = 1; j < L; j++) bwd[j] <= bwd[j-1];
        y <= acc[L-1];
      end
    end
  end

endmodule
