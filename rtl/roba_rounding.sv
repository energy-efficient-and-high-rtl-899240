// roba_rounding -- rounds an unsigned magnitude to the nearest power of two.
//
// The output is the rounded value itself, which is one-hot (or zero for a
// zero input). With the leading one of x at bit k, x lies in [2^k, 2^(k+1))
// and the midpoint is 3*2^(k-1); x is at or above it exactly when bit k-1 is
// also set. The rule is therefore:
//   * bits k and k-1 set, k >= 2   -> round up to 2^(k+1)
//   * otherwise                    -> round down to 2^k
// A tie (x = 3*2^(k-1)) goes to the larger power, except x = 3, which goes to
// 2; both follow the description, which picks the larger neighbour because it
// needs less logic and makes the single exception for 3.
//
// Written as logic per output bit: out[j] is set when x's leading one is at
// bit j and rounding does not go up, or when the leading one is at bit j-1
// and rounding goes up. One instance rounds one operand; the multiplier uses
// two (the description draws a single "Rounding" box serving both).
//
// Interface: x is N-bit unsigned, r is N-bit one-hot or zero. The largest
// rounded value of an N-bit magnitude that is at most 2^(N-1) is 2^(N-1), so
// N output bits suffice. A magnitude at or above 3*2^(N-2), which cannot come
// from the sign detector, would need bit N and is clamped to 2^(N-1).
// Timing: purely combinational.
module roba_rounding #(
  parameter int unsigned N = roba_pkg::ROBA_N
) (
  input  logic [N-1:0] x,
  output logic [N-1:0] r
);

  // lead[j] = 1 when bit j is the leading one of x.
  logic [N-1:0] lead;
  // up[j] = 1 when the leading one is at bit j and x rounds up.
  logic [N-1:0] up;

  always_comb begin
    logic higher;
    higher = 1'b0;
    for (int j = N - 1; j >= 0; j--) begin
      lead[j] = x[j] & ~higher;
      higher  = higher | x[j];
    end
    up = '0;
    for (int j = 2; j < N; j++) begin
      up[j] = lead[j] & x[j-1];
    end
    for (int j = 0; j < N; j++) begin
      r[j] = lead[j] & ~up[j];
      if (j >= 1) r[j] = r[j] | up[j-1];
    end
    // Top bit rounding up has no place to go: keep 2^(N-1).
    r[N-1] = r[N-1] | up[N-1];
  end

  // The rounded value must be a power of two or zero.
  always_comb begin
    assert ((r & (r - 1'b1)) == '0)
      else $error("roba_rounding: output %0h is not a power of two", r);
  end

endmodule : roba_rounding
