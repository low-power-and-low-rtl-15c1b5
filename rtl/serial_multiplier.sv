// serial_multiplier: bit-serial multiplier with parallel coefficient.
//
// The serial operand b enters LSB first, one bit per cycle, and passes down a
// chain of W-1 delay flip-flops, so cell i sees b delayed by i bit times.
// Cell i ANDs that bit with coefficient bit a[i] and adds it, in a full
// adder, to the sum coming from cell i-1 and to its own carry from the
// previous bit time (carry fed back through a flip-flop). The sum passes
// from cell to cell without a register, so at bit time t the last cell
// emits bit t of  z + a*b : the critical path holds W full adders and the
// carry loops keep it from being pipelined.
// Operands: a is unsigned and held for the whole word; b is read as a
// two's-complement number if the caller sign-extends it for the whole word,
// and the product is then exact modulo 2**(word length). z is a serial
// addend entering the first cell (the leftmost sum input); tie it to 0 for a
// plain product. `start` marks bit 0: the delay chain and the carries are
// treated as zero for that bit, so words can follow back to back.
// Cell structure and chaining follow the published design; `start` and the z input
// usage are this design's choices. Output has no latency.
module serial_multiplier #(
  parameter int unsigned W = 4     // coefficient word length
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a,          // coefficient, parallel, unsigned
  input  logic         b,          // serial operand, LSB first
  input  logic         z,          // serial addend, LSB first
  output logic         p           // serial result, LSB first
);

  logic [W-1:0] b_q;     // b_q[i]: b delayed i cycles (index 0 unused)
  logic [W-1:0] b_eff;   // bit seen by cell i in this cycle
  logic [W-1:0] cy_q;    // carry flip-flop of each cell
  logic [W-1:0] cy_out;
  logic [W:0]   s;       // s[0] = z, s[i+1] = sum out of cell i

  always_comb begin
    b_eff[0] = b;
    for (int i = 1; i < W; i++) b_eff[i] = start ? 1'b0 : b_q[i];
  end

  assign s[0] = z;
  for (genvar i = 0; i < W; i++) begin : g_cell
    logic pp, ci;
    assign pp        = a[i] & b_eff[i];
    assign ci        = start ? 1'b0 : cy_q[i];
    assign s[i+1]    = pp ^ s[i] ^ ci;
    assign cy_out[i] = (pp & s[i]) | (pp & ci) | (s[i] & ci);
  end

  assign p = s[W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_q  <= '0;
      cy_q <= '0;
    end else begin
      for (int i = 1; i < W; i++) b_q[i] <= b_eff[i-1];
      b_q[0] <= 1'b0;
      cy_q <= cy_out;
    end
  end

endmodule
