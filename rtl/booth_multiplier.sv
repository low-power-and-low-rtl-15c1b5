// booth_multiplier: radix-4 Booth multiplier, signed multiplicand x unsigned multiplier y.
//
// Structure, in the order the operands pass through it:
//   input buffers   x and y are taken as they arrive (no register)
//   Booth encoders  y is padded with a 0 below its LSB and with zeros above
//                   its MSB (two for an even width, one for an odd width),
//                   then cut into overlapping triplets, one encoder each
//   PPGs            one partial product row per triplet (0, +-x, +-2x)
//   compressors     a chain of 3:2 carry-save adders reduces the rows, plus
//                   one row holding the +1 negation corrections, to a sum
//                   and a carry vector
//   CPA             one carry propagation adder forms the product
// Because y is zero-padded it is read as unsigned, so the product needs
// XW+YW+1 bits and is signed. Padding, grouping and the encoder/PPG split
// follow the published design; the carry-save chain (rather than a tree) and the
// separate correction row are this design's choices. Combinational.
module booth_multiplier
  import fir_pkg::*;
#(
  parameter int unsigned XW = 8,   // multiplicand width (two's complement)
  parameter int unsigned YW = 8,   // multiplier width (unsigned)
  localparam int unsigned PW = XW + YW + 1,
  localparam int unsigned NG = YW / 2 + 1   // Booth groups after padding
) (
  input  logic signed [XW-1:0] x,
  input  logic        [YW-1:0] y,
  output logic signed [PW-1:0] p
);

  // y with one zero below and zero padding above: bit j of ypad is y[j-1].
  logic [2*NG:0] ypad;
  assign ypad = {{(2*NG - YW){1'b0}}, y, 1'b0};

  booth_ctrl_t        ctrl [NG];
  logic [XW:0]        pp   [NG];
  logic [NG-1:0]      neg;
  logic [PW-1:0]      row  [NG+1];   // aligned, sign-extended rows

  for (genvar i = 0; i < NG; i++) begin : g_row
    booth_encoder u_enc (
      .y_triplet (ypad[2*i +: 3]),
      .ctrl      (ctrl[i])
    );
    booth_ppg #(.XW(XW)) u_ppg (
      .x    (x),
      .ctrl (ctrl[i]),
      .pp   (pp[i]),
      .neg  (neg[i])
    );
    // Sign-extend the row to PW bits and move it to weight 4**i.
    assign row[i] = PW'({{(PW - XW - 1){pp[i][XW]}}, pp[i]} << (2 * i));
  end

  // Negation corrections: neg[i] sits at bit 2i.
  always_comb begin
    row[NG] = '0;
    for (int i = 0; i < NG; i++) row[NG][2*i] = neg[i];
  end

  // Carry-save chain: (row0,row1,row2) -> (s,c); (s,c,row3) -> ...
  logic [PW-1:0] cs_s [1:NG-1];
  logic [PW-1:0] cs_c [1:NG-1];

  csa32 #(.W(PW)) u_csa0 (
    .a (row[0]), .b (row[1]), .c (row[2]),
    .sum (cs_s[1]), .carry (cs_c[1])
  );
  for (genvar r = 3; r <= NG; r++) begin : g_csa
    csa32 #(.W(PW)) u_csa (
      .a (cs_s[r-2]), .b (cs_c[r-2]), .c (row[r]),
      .sum (cs_s[r-1]), .carry (cs_c[r-1])
    );
  end

  // Carry propagation adder.
  assign p = signed'(cs_s[NG-1] + cs_c[NG-1]);

endmodule
