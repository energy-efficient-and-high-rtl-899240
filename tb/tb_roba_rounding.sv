// tb_roba_rounding -- self-checking testbench for roba_rounding.
//
// Drives every input value of an 8-bit and a 5-bit instance and compares the
// rounded output with the distance-based reference model. Also counts the
// cases the rounding rule distinguishes (round up, round down, tie taken
// upward, the 3 -> 2 exception) and fails if one was never reached.
module tb_roba_rounding;
  import roba_ref_pkg::*;

  localparam int unsigned N8 = 8;
  localparam int unsigned N5 = 5;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_tie = 0, n_three = 0;

  logic [N8-1:0] x8, r8;
  logic [N5-1:0] x5, r5;

  roba_rounding #(.N(N8)) dut8 (.x(x8), .r(r8));
  roba_rounding #(.N(N5)) dut5 (.x(x5), .r(r5));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Inputs up to 2^(N-1), the magnitude range of an N-bit signed operand.
    for (longint v = 0; v <= (1 << (N8 - 1)); v++) begin
      longint exp_r;
      x8 = v[N8-1:0];
      @(posedge clk);
      exp_r = ref_round(v, N8);
      checks++;
      if (longint'(r8) != exp_r) begin
        failures++;
        $display("N=8 x=%0d r=%0d expected %0d", v, r8, exp_r);
      end
      if (exp_r > v) n_up++;
      if (exp_r < v) n_down++;
      if (v >= 6 && (v % 3) == 0 && ((v / 3) & (v / 3 - 1)) == 0 && exp_r > v) n_tie++;
      if (v == 3 && exp_r == 2) n_three++;
    end
    for (longint v = 0; v <= (1 << (N5 - 1)); v++) begin
      longint exp_r;
      x5 = v[N5-1:0];
      @(posedge clk);
      exp_r = ref_round(v, N5);
      checks++;
      if (longint'(r5) != exp_r) begin
        failures++;
        $display("N=5 x=%0d r=%0d expected %0d", v, r5, exp_r);
      end
    end
    checks++; if (n_up    == 0) begin failures++; $display("no round-up case"); end
    checks++; if (n_down  == 0) begin failures++; $display("no round-down case"); end
    checks++; if (n_tie   == 0) begin failures++; $display("no tie case"); end
    checks++; if (n_three == 0) begin failures++; $display("no 3->2 case"); end
    $display("round up %0d, round down %0d, ties up %0d, 3->2 %0d", n_up, n_down, n_tie, n_three);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_roba_rounding
