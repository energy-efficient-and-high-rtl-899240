// roba_signed_multiplier -- signed rounding-based approximate multiplier (top).
//
// Multiplies two two's complement numbers approximately, using only shifts,
// one addition and one subtraction. Rounding to a power of two only helps for
// non-negative numbers, so the operands are first turned into magnitudes and
// the sign of the product is set aside; the magnitudes go through the
// unsigned RoBA datapath (round, shift, add, subtract); finally the saved
// sign is applied:
//
//   a,b -> sign detector -> |a|,|b| -> unsigned RoBA -> sign set -> p
//                       \------------- neg ------------/
//
// The block order and the connections follow the described block diagram.
// The 8-bit default width is this design's choice (see roba_pkg).
//
// Interface: a, b are N-bit two's complement, p is the 2N-bit two's
// complement approximate product. The most negative input is handled: its
// magnitude 2^(N-1) is a power of two and multiplies exactly. Timing: purely
// combinational, no clock and no reset; register the ports outside if a
// pipelined use is wanted.
module roba_signed_multiplier #(
  parameter int unsigned N = roba_pkg::ROBA_N
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  logic [N-1:0]   abs_a, abs_b;
  logic           neg;
  logic [2*N-1:0] mag;

  roba_sign_detector #(.N(N)) u_sign_detector (
    .a(a), .b(b), .abs_a(abs_a), .abs_b(abs_b), .neg(neg)
  );

  roba_unsigned_multiplier #(.N(N)) u_core (
    .a(abs_a), .b(abs_b), .p(mag)
  );

  roba_sign_set #(.W(2*N)) u_sign_set (
    .mag(mag), .neg(neg), .p(p)
  );

endmodule : roba_signed_multiplier
