// roba_adder -- adds the two cross products Br*|A| and Ar*|B|.
//
// Interface: W-bit unsigned inputs, W-bit unsigned sum. With magnitudes of at
// most 2^(N-1) each cross product is at most 2^(2N-2), so their sum fits in
// W = 2N bits without a carry out. The adder itself follows the description;
// leaving the carry-chain architecture to synthesis is this design's choice.
// Timing: purely combinational.
module roba_adder #(
  parameter int unsigned W = 2 * roba_pkg::ROBA_N
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] sum
);

  always_comb sum = x + y;

endmodule : roba_adder
