// tb_roba_sign_detector -- self-checking testbench for roba_sign_detector.
//
// Applies every pair of 8-bit two's complement operands and checks both
// magnitudes and the product sign against integer arithmetic, including the
// most negative value -128, whose magnitude 128 must still be produced.
module tb_roba_sign_detector;
  localparam int unsigned N = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [N-1:0] a, b, abs_a, abs_b;
  logic         neg;

  roba_sign_detector #(.N(N)) dut (.a(a), .b(b), .abs_a(abs_a), .abs_b(abs_b), .neg(neg));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = -(1 << (N - 1)); va < (1 << (N - 1)); va++) begin
      for (int vb = -(1 << (N - 1)); vb < (1 << (N - 1)); vb++) begin
        int ea, eb;
        logic en;
        a = va[N-1:0];
        b = vb[N-1:0];
        @(posedge clk);
        ea = (va < 0) ? -va : va;
        eb = (vb < 0) ? -vb : vb;
        en = (va < 0) != (vb < 0);
        checks++;
        if (int'(abs_a) != ea || int'(abs_b) != eb || neg != en) begin
          failures++;
          if (failures < 10)
            $display("a=%0d b=%0d: |a|=%0d |b|=%0d neg=%0b, expected %0d %0d %0b",
                     va, vb, abs_a, abs_b, neg, ea, eb, en);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_roba_sign_detector
