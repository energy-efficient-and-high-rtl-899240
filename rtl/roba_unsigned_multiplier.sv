// roba_unsigned_multiplier -- unsigned rounding-based approximate multiplier.
//
// The exact product can be written as
//   A*B = (Ar-A)*(Br-B) + Ar*B + Br*A - Ar*Br
// where Ar and Br are A and B rounded to the nearest power of two. The first
// term needs a real multiplier but is small, so it is dropped:
//   A*B ~= Ar*B + Br*A - Ar*Br
// The three remaining products each have a power-of-two factor and are done
// by shifters; one adder and one subtractor combine them. The result may be
// above or below the exact product, depending on which way each operand was
// rounded, and is exact when either operand is a power of two or zero.
//
// Structure (all as described): two rounding units, three shifters (|A|*Br,
// |B|*Ar, Br*Ar), an adder for the two cross products and a subtractor for
// Ar*Br.
//
// Interface: a, b are N-bit unsigned magnitudes no larger than 2^(N-1)
// (the range the sign detector delivers); p is the 2N-bit approximate
// product. Timing: purely combinational, no clock.
module roba_unsigned_multiplier #(
  parameter int unsigned N = roba_pkg::ROBA_N
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  logic [N-1:0]   ar, br;
  logic [2*N-1:0] br_a, ar_b, ar_br;
  logic [2*N-1:0] cross_sum;

  roba_rounding #(.N(N)) u_round_a (.x(a), .r(ar));
  roba_rounding #(.N(N)) u_round_b (.x(b), .r(br));

  roba_shifter #(.N(N)) u_shift_br_a  (.x(a),  .onehot(br), .y(br_a));
  roba_shifter #(.N(N)) u_shift_ar_b  (.x(b),  .onehot(ar), .y(ar_b));
  roba_shifter #(.N(N)) u_shift_ar_br (.x(br), .onehot(ar), .y(ar_br));

  roba_adder      #(.W(2*N)) u_add (.x(br_a), .y(ar_b), .sum(cross_sum));
  roba_subtractor #(.W(2*N)) u_sub (.x(cross_sum), .y(ar_br), .diff(p));

endmodule : roba_unsigned_multiplier
