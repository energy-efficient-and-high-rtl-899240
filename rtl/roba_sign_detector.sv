// roba_sign_detector -- input stage of the signed RoBA multiplier.
//
// The rounding trick only works on non-negative numbers, because the rounded
// value of a negative two's complement number is not a power of two. This
// block therefore takes both two's complement operands, outputs their
// magnitudes |A| and |B| and the sign of the final product (sign(A) xor
// sign(B)), which is carried to the sign-set stage at the output.
//
// Interface: a, b are N-bit two's complement; abs_a, abs_b are N-bit unsigned
// (the most negative input -2^(N-1) gives the magnitude 2^(N-1), which still
// fits in N unsigned bits); neg is 1 when the product must be negated.
// Timing: purely combinational.
//
// Taking the magnitude by two's complement negation of negative inputs, and
// the xor of the sign bits for the product sign, follow the description.
module roba_sign_detector #(
  parameter int unsigned N = roba_pkg::ROBA_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] abs_a,
  output logic [N-1:0] abs_b,
  output logic         neg
);

  always_comb begin
    abs_a = a[N-1] ? (~a + 1'b1) : a;
    abs_b = b[N-1] ? (~b + 1'b1) : b;
    neg   = a[N-1] ^ b[N-1];
  end

endmodule : roba_sign_detector
