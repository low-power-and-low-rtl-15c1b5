// shift_add_multiplier: multiplier by a constant, built from shifts and adds only.
//
// The constant coefficient is written as a sum of powers of two. It is given
// as an unsigned fixed-point number: COEF is an integer and FRAC of its bits
// are fractional, so its value is COEF / 2**FRAC. Every 1 bit j of COEF adds
// the sample shifted left by j to a chain of adders, which is the graph of
// powers of two with one adder per extra term; zero bits cost nothing. The
// default, COEF = 15 with FRAC = 2, is 3.75 = 2^1 + 2^0 + 2^-1 + 2^-2: four
// shifted copies of x and three adders.
// The result keeps all bits: p = x * COEF exactly, i.e. the product x * 3.75
// with FRAC fractional bits. Combinational, signed sample. The shift-add
// decomposition and the 3.75 example follow the published design; the
// fixed-point format and the unsigned coefficient are this design's choices.
// FRAC only documents the format: it does not change the hardware.
module shift_add_multiplier #(
  parameter int unsigned XW   = 8,
  parameter int unsigned CW   = 8,
  parameter int unsigned COEF = 15,   // coefficient * 2**FRAC
  parameter int unsigned FRAC = 2,    // fractional bits of COEF and of p
  localparam int unsigned PW  = XW + CW
) (
  input  logic signed [XW-1:0] x,
  output logic signed [PW-1:0] p
);

  localparam logic [CW-1:0] C = CW'(COEF);

  logic signed [PW-1:0] xe;
  logic signed [PW-1:0] chain [CW+1];   // chain[j]: sum of the terms below bit j

  assign xe       = PW'(x);
  assign chain[0] = '0;
  for (genvar j = 0; j < CW; j++) begin : g_term
    if (C[j]) begin : g_add
      assign chain[j+1] = chain[j] + (xe <<< j);
    end else begin : g_skip
      assign chain[j+1] = chain[j];
    end
  end
  assign p = chain[CW];

endmodule
