// tb_fp_sign_unit: sign unit. All four sign combinations; s must be their exclusive OR.
// Self-checking; prints one TB_RESULT line. A free-running clock drives the
// watchdog, which fails the run after 1000 cycles.
module tb_fp_sign_unit;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
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
  logic sa, sb, s;
  fp_sign_unit dut (.*);
  initial begin
    for (int v = 0; v < 4; v++) begin
      {sa, sb} = 2'(v);
      #1;
      check(s == (sa != sb), $sformatf("%0d %0d -> %0d", sa, sb, s));
    end
    finish_tb();
  end
endmodule
