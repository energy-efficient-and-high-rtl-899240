// tb_roba_adder -- self-checking testbench for roba_adder.
//
// Checks corner values and random pairs of 16-bit operands against integer
// addition modulo 2^16.
module tb_roba_adder;
  localparam int unsigned W = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [W-1:0] x, y, sum;

  roba_adder #(.W(W)) dut (.x(x), .y(y), .sum(sum));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int vx, int vy);
    int e;
    x = vx[W-1:0];
    y = vy[W-1:0];
    @(posedge clk);
    e = (vx + vy) % (1 << W);
    checks++;
    if (int'(sum) != e) begin
      failures++;
      $display("%0d + %0d: got %0d expected %0d", vx, vy, sum, e);
    end
  endtask

  initial begin
    check(0, 0);
    check(1, 1);
    check(32'h7fff, 1);
    check(32'h00ff, 32'h0001);
    check(32'h4000, 32'h4000);
    for (int i = 0; i < 20000; i++) check($urandom_range(32'hffff), $urandom_range(32'hffff));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_roba_adder
