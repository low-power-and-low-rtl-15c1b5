// booth_encoder: radix-4 Booth recoding of one overlapping multiplier triplet.
//
// The triplet {y[2i+1], y[2i], y[2i-1]} selects one of 0, +-1x, +-2x of the
// multiplicand. The encoder reduces this to three control bits, exactly as in
// the recoding table: Direction D = y[2i+1] (negate), Shift S = y[2i+1] xor
// y[2i] (use 2x) and Addition A = y[2i-1] xor y[2i] (use 1x). When A is 1 the
// value of S does not matter; the partial product generator gives A priority.
// Two XOR gates and no state: the outputs follow the input combinationally.
module booth_encoder
  import fir_pkg::*;
(
  input  logic [2:0]  y_triplet,  // {y[2i+1], y[2i], y[2i-1]}
  output booth_ctrl_t ctrl
);

  always_comb begin
    ctrl.dir   = y_triplet[2];
    ctrl.shift = y_triplet[2] ^ y_triplet[1];
    ctrl.add   = y_triplet[0] ^ y_triplet[1];
  end

endmodule
