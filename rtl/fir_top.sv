// fir_top: five FIR filter implementations side by side on one sample stream.
//
// All five compute an 8-tap filter of the same 8-bit signed input; they differ
// in how the multiplications are done, which is what trades area against
// power:
//   mac   transversal filter, one radix-4 Booth multiplier per tap
//   lp    linear-phase filter, pre-adders halve the Booth multipliers
//   fold  the linear-phase filter folded onto one Booth multiplier (4 cycles/sample)
//   ser   bit-serial multipliers and adders (19 cycles/sample)
//   sa    fixed coefficients, shift-add multipliers
// A sample is taken when x_valid and x_ready are high; x_ready is low while
// the folded or the serial filter is still busy with the previous sample, so
// every filter sees every sample. Each filter has its own output and
// y_valid; the latencies differ (1, 1, 5 and 20 cycles after the accepting
// edge; 1 for sa). mac and ser use coef as h[0..7]; lp and fold use
// lp_coef as h[0..3] with h[7-k] = h[k]; sa uses its built-in coefficients.
module fir_top
  import fir_pkg::*;
#(
  localparam int unsigned DW  = fir_pkg::DATA_W,
  localparam int unsigned CW  = fir_pkg::COEF_W,
  localparam int unsigned N   = fir_pkg::TAPS,
  localparam int unsigned L   = N / 2,
  localparam int unsigned LG  = clog2_min1(N),
  localparam int unsigned LGL = clog2_min1(L)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          x_valid,
  output logic                          x_ready,
  input  logic signed [DW-1:0]          x,
  input  logic        [CW-1:0]          coef    [N],
  input  logic        [CW-1:0]          lp_coef [L],
  output logic                          mac_valid,
  output logic signed [DW+CW+LG:0]      mac_y,
  output logic                          lp_valid,
  output logic signed [DW+CW+LGL+1:0]   lp_y,
  output logic                          fold_valid,
  output logic signed [DW+CW+LGL+1:0]   fold_y,
  output logic                          ser_valid,
  output logic signed [DW+CW+LG-1:0]    ser_y,
  output logic                          sa_valid,
  output logic signed [DW+CW+LG-1:0]    sa_y       // 2 fractional bits
);

  logic fold_ready, ser_ready, take;

  assign x_ready = fold_ready && ser_ready;
  assign take    = x_valid && x_ready;

  mac_fir_booth u_mac (
    .clk, .rst_n, .x_valid (take), .x, .coef,
    .y_valid (mac_valid), .y (mac_y)
  );

  linear_phase_fir u_lp (
    .clk, .rst_n, .x_valid (take), .x, .coef (lp_coef),
    .y_valid (lp_valid), .y (lp_y)
  );

  folded_lp_fir u_fold (
    .clk, .rst_n, .x_valid (take), .x_ready (fold_ready), .x, .coef (lp_coef),
    .y_valid (fold_valid), .y (fold_y)
  );

  serial_mac_fir u_ser (
    .clk, .rst_n, .x_valid (take), .x_ready (ser_ready), .x, .coef,
    .y_valid (ser_valid), .y (ser_y)
  );

  shift_add_fir u_sa (
    .clk, .rst_n, .x_valid (take), .x,
    .y_valid (sa_valid), .y (sa_y)
  );

endmodule
