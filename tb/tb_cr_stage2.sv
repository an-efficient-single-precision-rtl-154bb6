// tb_cr_stage2: stage 2 diagonal adders. Random 16-bit block products, including all-ones; checks the three diagonal sums.
// Self-checking; prints one TB_RESULT line. A free-running clock drives the
// watchdog, which fails the run after 100000 cycles.
module tb_cr_stage2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  logic [15:0] pb [3][3];
  logic [16:0] c1, c3;
  logic [17:0] c2;
  cr_stage2 dut (.*);
  initial begin
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) pb[i][j] = (n == 0) ? 16'hFFFF : 16'($urandom);
      #1;
      check(int'(c1) == int'(pb[1][0]) + int'(pb[0][1]), "c1");
      check(int'(c2) == int'(pb[2][0]) + int'(pb[1][1]) + int'(pb[0][2]), "c2");
      check(int'(c3) == int'(pb[2][1]) + int'(pb[1][2]), "c3");
    end
    finish_tb();
  end
endmodule
