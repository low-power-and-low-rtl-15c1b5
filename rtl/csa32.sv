// csa32: a word of 3:2 compressors (carry-save adder).
//
// Each bit position is a full adder: a + b + c = sum + 2*carry, with the
// carry vector returned already shifted one place left, so that
// a + b + c == sum + carry modulo 2**W. No carry ripples between bits.
// Used by the Booth multiplier to reduce its partial product rows to one
// sum and one carry vector. Combinational. The published design names the
// compressors without detailing them; this is the plain 3:2 form.
module csa32 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  // The majority (carry) of the top bit would leave the word; it is dropped.
  logic [W-2:0] maj;

  always_comb begin
    sum   = a ^ b ^ c;
    maj   = (a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) | (b[W-2:0] & c[W-2:0]);
    carry = {maj, 1'b0};
  end

endmodule
