// tb_csa32: 3:2 carry save adder. Random operands at W = 16; checks the bitwise sum and the identity x + y + z = s + 2c.
// Self-checking; prints one TB_RESULT line. A free-running clock drives the
// watchdog, which fails the run after 100000 cycles.
module tb_csa32;
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
  logic [15:0] x, y, z, s, c;
  csa32 #(.W(16)) dut (.*);
  initial begin
    for (int n = 0; n < 3000; n++) begin
      x = 16'($urandom); y = 16'($urandom); z = 16'($urandom);
      if (n == 0) begin x = '1; y = '1; z = '1; end
      #1;
      check(18'(x) + 18'(y) + 18'(z) == 18'(s) + (18'(c) << 1), $sformatf("sum identity %h %h %h", x, y, z));
      for (int i = 0; i < 16; i++)
        check({c[i], s[i]} == 2'(x[i]) + 2'(y[i]) + 2'(z[i]), $sformatf("bit %0d", i));
    end
    finish_tb();
  end
endmodule
