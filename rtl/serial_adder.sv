// serial_adder: bit-serial adder.
//
// One full adder adds the two operand bits of the current bit time; its carry
// out is held in a flip-flop and returned as carry in at the next bit time.
// Operands arrive LSB first, one bit per cycle, and the sum bit leaves in the
// same cycle (no latency). `start` marks bit 0 of a word: the held carry is
// ignored for that bit, so consecutive words need no gap. The structure is
// the usual one; the `start` convention is this design's choice.
module serial_adder (
  input  logic clk,
  input  logic rst_n,
  input  logic start,   // bit 0 of a new word
  input  logic a,
  input  logic b,
  output logic s
);

  logic cy_q, cy_in, cy_out;

  assign cy_in  = start ? 1'b0 : cy_q;
  assign s      = a ^ b ^ cy_in;
  assign cy_out = (a & b) | (a & cy_in) | (b & cy_in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cy_q <= 1'b0;
    else        cy_q <= cy_out;
  end

endmodule
