// csa: carry save adder over W-bit vectors.
//
// Adds three vectors x, y, z without carry propagation: every bit position is
// a full adder, giving a sum vector s and a carry vector c such that
//   x + y + z = s + 2*c   (exact, c has the same width W).
// The carry vector is returned unshifted; the user weights it by two.
// Purely combinational. The Montgomery multiplier uses two of these back to
// back, as in the reference architecture; the full-adder form is this design's choice.
module csa #(
  parameter int unsigned W = 1027
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  always_comb begin
    s = x ^ y ^ z;
    c = (x & y) | (x & z) | (y & z);
  end
endmodule
