// tb_roba_shifter -- self-checking testbench for roba_shifter.
//
// For every 8-bit operand and every one-hot factor (and the zero factor)
// checks the shifted result against an ordinary integer product.
module tb_roba_shifter;
  localparam int unsigned N = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [N-1:0]   x, onehot;
  logic [2*N-1:0] y;

  roba_shifter #(.N(N)) dut (.x(x), .onehot(onehot), .y(y));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      for (int k = -1; k < int'(N); k++) begin
        int f;
        f = (k < 0) ? 0 : (1 << k);
        x = v[N-1:0];
        onehot = f[N-1:0];
        @(posedge clk);
        checks++;
        if (int'(y) != v * f) begin
          failures++;
          if (failures < 10) $display("x=%0d factor=%0d: y=%0d expected %0d", v, f, y, v * f);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_roba_shifter
