// tb_roba_subtractor -- self-checking testbench for roba_subtractor.
//
// Checks corner values and random pairs with x >= y (the only case the
// multiplier produces) against integer subtraction.
module tb_roba_subtractor;
  localparam int unsigned W = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [W-1:0] x, y, diff;

  roba_subtractor #(.W(W)) dut (.x(x), .y(y), .diff(diff));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int vx, int vy);
    x = vx[W-1:0];
    y = vy[W-1:0];
    @(posedge clk);
    checks++;
    if (int'(diff) != vx - vy) begin
      failures++;
      $display("%0d - %0d: got %0d expected %0d", vx, vy, diff, vx - vy);
    end
  endtask

  initial begin
    check(0, 0);
    check(1, 1);
    check(32'h8000, 1);
    check(32'hffff, 32'h0001);
    check(32'h4000, 32'h3fff);
    for (int i = 0; i < 20000; i++) begin
      int a, b;
      a = $urandom_range(32'hffff);
      b = $urandom_range(a);
      check(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_roba_subtractor
