// serial_mac_fir: FIR filter built from bit-serial multipliers and bit-serial adders.
//
//   y[n] = sum_{k=0}^{NTAP-1} f[k] * x[n-k]
//
// Samples are held in a word-wide delay line. When a sample is accepted,
// every tap's word (x[n-k]) is copied into a shift register that then
// streams it LSB first, sign-extended, for a frame of FW = DW+CW+log2(NTAP)
// bit times. Each tap has a serial multiplier with its coefficient f[k] in
// parallel; a chain of NTAP-1 serial adders sums the product streams, and the
// result bits are gathered into y. FW bits are enough for the full-precision
// sum, so the modulo-2**FW serial arithmetic gives the exact result.
// Timing: one sample every FW cycles (x_ready shows when the next one is
// taken); y_valid pulses FW+1 cycles after the accepting edge.
// The tap multipliers and adders are the published serial cells; the frame
// length, the word delay line, the handshake and the output register are
// this design's choices. Coefficients are unsigned.
module serial_mac_fir
  import fir_pkg::*;
#(
  parameter int unsigned DW   = fir_pkg::DATA_W,
  parameter int unsigned CW   = fir_pkg::COEF_W,
  parameter int unsigned NTAP = fir_pkg::TAPS,
  localparam int unsigned FW  = DW + CW + clog2_min1(NTAP)    // frame, bits
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 x_valid,
  output logic                 x_ready,
  input  logic signed [DW-1:0] x,
  input  logic        [CW-1:0] coef [NTAP],
  output logic                 y_valid,
  output logic signed [FW-1:0] y
);

  logic          accept, busy, first, last;

  fold_ctrl #(.STEPS(FW)) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .x_valid (x_valid),
    .x_ready (x_ready),
    .accept  (accept),
    .busy    (busy),
    .step    (),
    .first   (first),
    .last    (last)
  );

  logic signed [DW-1:0] dly [1:NTAP-1];   // word delay line, dly[k] = x[n-k]
  logic signed [DW-1:0] sr  [NTAP];       // per-tap serializers

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < NTAP; k++) dly[k] <= '0;
      for (int k = 0; k < NTAP; k++) sr[k]  <= '0;
    end else if (accept) begin
      dly[1] <= x;
      for (int k = 2; k < NTAP; k++) dly[k] <= dly[k-1];
      sr[0] <= x;
      for (int k = 1; k < NTAP; k++) sr[k] <= dly[k];
    end else if (busy) begin
      for (int k = 0; k < NTAP; k++) sr[k] <= sr[k] >>> 1;   // sign-extends
    end
  end

  // Serial multipliers, one per tap.
  logic [NTAP-1:0] pbit;
  for (genvar k = 0; k < NTAP; k++) begin : g_mul
    serial_multiplier #(.W(CW)) u_mul (
      .clk   (clk),
      .rst_n (rst_n),
      .start (first),
      .a     (coef[k]),
      .b     (sr[k][0]),
      .z     (1'b0),
      .p     (pbit[k])
    );
  end

  // Serial adder chain: sbit[k] = bit of sum_{j<=k} products.
  logic [NTAP-1:0] sbit;
  assign sbit[0] = pbit[0];
  for (genvar k = 1; k < NTAP; k++) begin : g_add
    serial_adder u_add (
      .clk   (clk),
      .rst_n (rst_n),
      .start (first),
      .a     (sbit[k-1]),
      .b     (pbit[k]),
      .s     (sbit[k])
    );
  end

  // Deserializer and output register.
  logic [FW-2:0] col;   // bits 0..FW-2 of the frame
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= last;
      if (busy) col <= {sbit[NTAP-1], col[FW-2:1]};
      if (last) y   <= signed'({sbit[NTAP-1], col});
    end
  end

endmodule
