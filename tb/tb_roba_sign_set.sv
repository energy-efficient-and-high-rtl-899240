// tb_roba_sign_set -- self-checking testbench for roba_sign_set.
//
// Checks that magnitudes pass unchanged when the sign is positive and come
// out as their two's complement negation when it is negative.
module tb_roba_sign_set;
  localparam int unsigned W = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [W-1:0] mag, p;
  logic         neg;

  roba_sign_set #(.W(W)) dut (.mag(mag), .neg(neg), .p(p));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int m, bit n);
    int e;
    mag = m[W-1:0];
    neg = n;
    @(posedge clk);
    e = n ? -m : m;
    checks++;
    if (int'($signed(p)) != e) begin
      failures++;
      $display("mag=%0d neg=%0b: got %0d expected %0d", m, n, $signed(p), e);
    end
  endtask

  initial begin
    check(0, 0);
    check(0, 1);
    check(1, 1);
    check(16384, 1);
    check(16384, 0);
    for (int i = 0; i < 20000; i++) check($urandom_range(16384), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_roba_sign_set
