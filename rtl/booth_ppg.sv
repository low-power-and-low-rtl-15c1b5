// booth_ppg: partial product generator for one radix-4 Booth row.
//
// One cell per output bit, each made of three 2:1 multiplexers:
//   direction mux  d[n] = D ? ~x[n] : x[n]
//   shift mux      s[n] = S ? d[n-1] : 0     (neighbour cell's direction mux)
//   addition mux   p[n] = A ? d[n]   : s[n]
// so the row is x, 2x, their ones' complements, or zero. The multiplicand is
// two's complement; it is sign-extended by one bit so that 2x fits, giving
// XW+1 row bits. d[-1] is D itself, which makes the shifted row's LSB right
// for -2x (ones' complement of x<<1 has a 1 there).
// The +1 that completes a negation is returned separately as `neg`; it is
// suppressed for the "-0x" code (D=1, S=0, A=0), whose row is all zero.
// The per-bit mux structure follows the partial product generator drawing;
// the `neg` handling and d[-1] are this design's choices. Combinational.
module booth_ppg
  import fir_pkg::*;
#(
  parameter int unsigned XW = 8          // multiplicand width
) (
  input  logic signed [XW-1:0] x,        // multiplicand (two's complement)
  input  booth_ctrl_t          ctrl,     // from booth_encoder
  output logic        [XW:0]   pp,       // row bits; bit XW is the row sign
  output logic                 neg       // +1 correction for a negated row
);

  logic [XW:0] xe;   // sign-extended multiplicand
  logic [XW:0] d;    // direction mux outputs

  always_comb begin
    xe = {x[XW-1], x};
    for (int n = 0; n <= XW; n++) begin
      d[n] = ctrl.dir ? ~xe[n] : xe[n];
    end
    for (int n = 0; n <= XW; n++) begin
      logic s;
      if (n == 0) s = ctrl.shift ? ctrl.dir : 1'b0;
      else        s = ctrl.shift ? d[n-1]   : 1'b0;
      pp[n] = ctrl.add ? d[n] : s;
    end
    neg = ctrl.dir & (ctrl.add | ctrl.shift);
  end

endmodule
