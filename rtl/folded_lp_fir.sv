// folded_lp_fir: folded linear-phase FIR filter, one Booth multiplier for all taps.
//
// Same filter as linear_phase_fir (N = 2*L taps, h[k] = h[N-1-k]) folded by L:
// the L tap pairs share one pre-adder, one radix-4 Booth multiplier and one
// accumulating adder with its register (REG). Two L:1 multiplexers pick the
// pair: Sel1 chooses forward tap x[n-k] and Sel2 the return-line tap
// x[n-(N-1-k)], and the coefficient C = f[k] is chosen with them.
//   accept   sample enters the forward line; all delay registers shift
//   step k   REG <= (k==0 ? 0 : REG) + (fwd[k] + bwd[L-1-k]) * f[k]
//   last     y takes the finished sum; y_valid is high on the next cycle
// Throughput is one sample every L cycles; y_valid comes L+1 cycles after the
// accepting clock edge. Delay line, multiplexers, pre-adder, multiplier and
// accumulator follow the folded drawing; the handshake, the mux input order
// (input k of Sel1 = x[n-k], Sel2 = L-1-Sel1 with input j = x[n-L-j]) and the
// output register are this design's choices.
module folded_lp_fir
  import fir_pkg::*;
#(
  parameter int unsigned DW   = fir_pkg::DATA_W,
  parameter int unsigned CW   = fir_pkg::COEF_W,
  parameter int unsigned NTAP = fir_pkg::TAPS,   // N, even
  localparam int unsigned L   = NTAP / 2,
  localparam int unsigned SW  = (L <= 2) ? 1 : $clog2(L),
  localparam int unsigned PW  = DW + 1 + CW + 1,
  localparam int unsigned YW  = PW + clog2_min1(L)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 x_valid,
  output logic                 x_ready,
  input  logic signed [DW-1:0] x,
  input  logic        [CW-1:0] coef [L],     // f[0] .. f[L-1]
  output logic                 y_valid,
  output logic signed [YW-1:0] y
);

  logic          accept, busy, first, last;
  logic [SW-1:0] sel1, sel2;

  fold_ctrl #(.STEPS(L)) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .x_valid (x_valid),
    .x_ready (x_ready),
    .accept  (accept),
    .busy    (busy),
    .step    (sel1),
    .first   (first),
    .last    (last)
  );
  assign sel2 = SW'(L - 1) - sel1;

  logic signed [DW-1:0] fwd [L];    // fwd[k] = x[n-k]
  logic signed [DW-1:0] bwd [L];    // bwd[j] = x[n-L-j]

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < L; k++) begin
        fwd[k] <= '0;
        bwd[k] <= '0;
      end
    end else if (accept) begin
      fwd[0] <= x;
      for (int k = 1; k < L; k++) fwd[k] <= fwd[k-1];
      bwd[0] <= fwd[L-1];                        // corner register
      for (int j = 1; j < L; j++) bwd[j] <= bwd[j-1];
    end
  end

  // Tap multiplexers, pre-adder, coefficient select.
  logic signed [DW-1:0] mux1, mux2;
  logic signed [DW:0]   pre;
  logic        [CW-1:0] c_n;
  logic signed [PW-1:0] prod;

  assign mux1 = fwd[sel1];
  assign mux2 = bwd[sel2];
  assign pre  = (DW+1)'(mux1) + (DW+1)'(mux2);
  assign c_n  = coef[sel1];

  booth_multiplier #(.XW(DW+1), .YW(CW)) u_mul (
    .x (pre),
    .y (c_n),
    .p (prod)
  );

  // Accumulator (REG).
  logic signed [YW-1:0] acc, acc_next;
  assign acc_next = (first ? '0 : acc) + YW'(prod);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= last;
      if (busy) acc <= acc_next;
      if (last) y   <= acc_next;
    end
  end

endmodule
