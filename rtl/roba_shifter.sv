// roba_shifter -- multiplies an operand by a power of two by shifting.
//
// In the RoBA multiplier every multiplication has a rounded operand, which is
// a power of two held one-hot. Multiplying by it is a left shift by the
// position of its single set bit. This block forms that shift as an AND-OR
// selection: for each bit position i of the one-hot factor, the operand
// shifted left by i is gated by that bit, and the gated copies are ORed. A
// zero factor gives zero, as the product does.
//
// The multiplier uses three instances: |A| by Br, |B| by Ar and Br by Ar.
// That three shifters produce the three products follows the description;
// the AND-OR form of the shift is this design's choice.
//
// Interface: x is N-bit unsigned, onehot is an N-bit power of two or zero,
// y = x * onehot is 2N bits. Timing: purely combinational.
module roba_shifter #(
  parameter int unsigned N = roba_pkg::ROBA_N
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   onehot,
  output logic [2*N-1:0] y
);

  always_comb begin
    y = '0;
    for (int i = 0; i < N; i++) begin
      y = y | (({{N{1'b0}}, x} << i) & {2*N{onehot[i]}});
    end
  end

endmodule : roba_shifter
