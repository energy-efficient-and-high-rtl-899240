// tb_roba_unsigned_multiplier -- self-checking testbench for the unsigned
// RoBA multiplier.
//
// Runs every pair of magnitudes 0..2^(N-1) on the default 8-bit instance and
// random pairs on a 16-bit instance, comparing with the reference model
// Ar*B + Br*A - Ar*Br. It also checks two properties that follow from the
// method: the result is exact when either operand is a power of two or zero,
// and it never differs from the exact product by more than a ninth of it.
module tb_roba_unsigned_multiplier;
  import roba_ref_pkg::*;

  localparam int unsigned N  = 8;
  localparam int unsigned NL = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_above = 0, n_below = 0, n_exact = 0;

  logic [N-1:0]    a, b;
  logic [2*N-1:0]  p;
  logic [NL-1:0]   al, bl;
  logic [2*NL-1:0] pl;

  roba_unsigned_multiplier #(.N(N))  dut   (.a(a),  .b(b),  .p(p));
  roba_unsigned_multiplier #(.N(NL)) dut_l (.a(al), .b(bl), .p(pl));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit is_pow2_or_zero(longint v);
    return (v & (v - 1)) == 0;
  endfunction

  initial begin
    for (longint va = 0; va <= (1 << (N - 1)); va++) begin
      for (longint vb = 0; vb <= (1 << (N - 1)); vb++) begin
        longint e, exact;
        a = va[N-1:0];
        b = vb[N-1:0];
        @(posedge clk);
        e     = ref_uprod(va, vb, N);
        exact = longint'(va) * vb;
        checks++;
        if (longint'(p) != e) begin
          failures++;
          if (failures < 10) $display("%0d x %0d: got %0d expected %0d", va, vb, p, e);
        end
        if (is_pow2_or_zero(va) || is_pow2_or_zero(vb)) begin
          checks++;
          if (longint'(p) != exact) begin
            failures++;
            if (failures < 10) $display("%0d x %0d: power-of-two case not exact (%0d)", va, vb, p);
          end
        end
        checks++;
        if (9 * ((longint'(p) > exact) ? longint'(p) - exact : exact - longint'(p)) > exact) begin
          failures++;
          if (failures < 10) $display("%0d x %0d: error above exact/9 (%0d)", va, vb, p);
        end
        if (longint'(p) > exact) n_above++;
        else if (longint'(p) < exact) n_below++;
        else n_exact++;
      end
    end
    for (int i = 0; i < 20000; i++) begin
      longint va, vb, e;
      va = longint'($urandom_range(1 << (NL - 1)));
      vb = longint'($urandom_range(1 << (NL - 1)));
      al = va[NL-1:0];
      bl = vb[NL-1:0];
      @(posedge clk);
      e = ref_uprod(va, vb, NL);
      checks++;
      if (longint'(pl) != e) begin
        failures++;
        if (failures < 10) $display("N=16 %0d x %0d: got %0d expected %0d", va, vb, pl, e);
      end
    end
    checks++; if (n_above == 0) begin failures++; $display("no result above exact"); end
    checks++; if (n_below == 0) begin failures++; $display("no result below exact"); end
    checks++; if (n_exact == 0) begin failures++; $display("no exact result"); end
    $display("above exact %0d, below exact %0d, exact %0d", n_above, n_below, n_exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_roba_unsigned_multiplier
