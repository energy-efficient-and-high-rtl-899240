// tb_roba_signed_multiplier -- end-to-end testbench for the signed RoBA
// multiplier at its default width (no parameter override on the top).
//
// Applies every pair of 8-bit two's complement operands, 65536 products, and
// compares each with the reference model: magnitudes rounded to the nearest
// power of two, Ar*B + Br*A - Ar*Br, sign of a*b applied. It also checks that
// products with a power-of-two or zero operand are exact and that no product
// is off by more than a ninth of the exact one.
//
// Every mechanism of the design is counted and must occur: operand rounded
// up, rounded down, a tie rounded up, the 3 -> 2 exception, a negative
// product through the sign-set stage, the most negative input, and results
// above, below and equal to the exact product. The multiplier is
// combinational: each product is checked in the cycle its operands are
// applied, so the latency checked is zero cycles.
module tb_roba_signed_multiplier;
  import roba_ref_pkg::*;

  localparam int unsigned N = roba_pkg::ROBA_N;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_tie = 0, n_three = 0, n_neg = 0, n_min = 0;
  int n_above = 0, n_below = 0, n_exact = 0;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;

  roba_signed_multiplier dut (.a(a), .b(b), .p(p));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Classify how one operand magnitude is rounded.
  task automatic count_rounding(longint m);
    longint r;
    r = ref_round(m, N);
    if (r > m) n_up++;
    if (r < m) n_down++;
    if (m >= 6 && (m % 3) == 0 && ((m / 3) & (m / 3 - 1)) == 0 && r > m) n_tie++;
    if (m == 3 && r == 2) n_three++;
  endtask

  initial begin
    for (longint va = -(1 << (N - 1)); va < (1 << (N - 1)); va++) begin
      for (longint vb = -(1 << (N - 1)); vb < (1 << (N - 1)); vb++) begin
        longint e, exact, got, ma, mb;
        a = va[N-1:0];
        b = vb[N-1:0];
        @(posedge clk);
        got   = longint'($signed(p));
        e     = ref_sprod(va, vb, N);
        exact = longint'(va) * vb;
        ma    = (va < 0) ? -va : va;
        mb    = (vb < 0) ? -vb : vb;
        checks++;
        if (got != e) begin
          failures++;
          if (failures < 10) $display("%0d x %0d: got %0d expected %0d", va, vb, got, e);
        end
        if ((ma & (ma - 1)) == 0 || (mb & (mb - 1)) == 0) begin
          checks++;
          if (got != exact) begin
            failures++;
            if (failures < 10) $display("%0d x %0d: power-of-two case not exact (%0d)", va, vb, got);
          end
        end
        checks++;
        if (9 * ((got > exact) ? got - exact : exact - got) > ((exact < 0) ? -exact : exact)) begin
          failures++;
          if (failures < 10) $display("%0d x %0d: error above |exact|/9 (%0d)", va, vb, got);
        end
        if (vb == 0) count_rounding(ma);
        if (got < 0) n_neg++;
        if (va == -(1 << (N - 1)) || vb == -(1 << (N - 1))) n_min++;
        if (got > exact) n_above++;
        else if (got < exact) n_below++;
        else n_exact++;
      end
    end
    checks++; if (n_up    == 0) begin failures++; $display("no operand rounded up"); end
    checks++; if (n_down  == 0) begin failures++; $display("no operand rounded down"); end
    checks++; if (n_tie   == 0) begin failures++; $display("no tie rounded up"); end
    checks++; if (n_three == 0) begin failures++; $display("no 3 -> 2 rounding"); end
    checks++; if (n_neg   == 0) begin failures++; $display("no negative product"); end
    checks++; if (n_min   == 0) begin failures++; $display("no most-negative operand"); end
    checks++; if (n_above == 0) begin failures++; $display("no result above exact"); end
    checks++; if (n_below == 0) begin failures++; $display("no result below exact"); end
    checks++; if (n_exact == 0) begin failures++; $display("no exact result"); end
    $display("rounded up %0d, down %0d, ties up %0d, 3->2 %0d; negative products %0d, most-negative operand %0d",
             n_up, n_down, n_tie, n_three, n_neg, n_min);
    $display("results above exact %0d, below %0d, equal %0d", n_above, n_below, n_exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_roba_signed_multiplier
