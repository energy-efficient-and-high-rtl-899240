// roba_subtractor -- subtracts Ar*Br from the sum of the cross products.
//
// It completes Ar*B + Br*A - Ar*Br. The dropped term (Ar-A)*(Br-B) is at most
// about one ninth of A*B, since no magnitude is more than a third away from
// its rounded value, so the difference is never negative and fits in W = 2N
// unsigned bits. Subtracting Ar*Br after the adder follows the described
// block diagram; the argument that no sign bit is needed is this design's.
//
// Interface: W-bit unsigned minuend and subtrahend, W-bit unsigned difference.
// Timing: purely combinational.
module roba_subtractor #(
  parameter int unsigned W = 2 * roba_pkg::ROBA_N
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] diff
);

  always_comb diff = x - y;

endmodule : roba_subtractor
