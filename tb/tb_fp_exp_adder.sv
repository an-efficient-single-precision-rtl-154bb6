// tb_fp_exp_adder: exponent adder. All pairs of effective exponents 1..254; e must equal ea + eb - 127.
// Self-checking; prints one TB_RESULT line. A free-running clock drives the
// watchdog, which fails the run after 1000000 cycles.
module tb_fp_exp_adder;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
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
  import fpm_pkg::*;
  logic signed [9:0] ea, eb, e;
  fp_exp_adder dut (.*);
  initial begin
    for (int i = 1; i < 255; i++)
      for (int j = 1; j < 255; j++) begin
        ea = 10'(i); eb = 10'(j);
        #1;
        check(int'(e) == i + j - 127, $sformatf("%0d + %0d -> %0d", i, j, e));
      end
    finish_tb();
  end
endmodule
