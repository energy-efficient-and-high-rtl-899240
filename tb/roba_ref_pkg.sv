// roba_ref_pkg -- reference model used by the RoBA testbenches.
//
// Computes the expected results with plain integer arithmetic, written
// independently of the RTL: the nearest power of two is found by comparing
// distances to every candidate, and the products by ordinary multiplication.
package roba_ref_pkg;

  // Nearest power of two to x (0 for x = 0). On a tie the larger power is
  // taken, except that 3 goes to 2. Results are limited to 2^(n-1).
  function automatic longint ref_round(longint x, int n);
    longint best, cand, d_best, d_cand;
    if (x == 0) return 0;
    best   = 1;
    d_best = (x > 1) ? x - 1 : 1 - x;
    for (int k = 1; k < n; k++) begin
      cand   = longint'(1) << k;
      d_cand = (x > cand) ? x - cand : cand - x;
      if (d_cand < d_best || (d_cand == d_best && x != 3)) begin
        best   = cand;
        d_best = d_cand;
      end
    end
    return best;
  endfunction

  // Approximate unsigned product Ar*B + Br*A - Ar*Br.
  function automatic longint ref_uprod(longint a, longint b, int n);
    longint ar, br;
    ar = ref_round(a, n);
    br = ref_round(b, n);
    return ar * b + br * a - ar * br;
  endfunction

  // Approximate signed product: magnitude from ref_uprod, sign of a*b.
  function automatic longint ref_sprod(longint a, longint b, int n);
    longint m;
    m = ref_uprod((a < 0) ? -a : a, (b < 0) ? -b : b, n);
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction

endpackage : roba_ref_pkg
