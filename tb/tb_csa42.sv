// tb_csa42: 4:2 carry save adder (two 3:2 stages). Random operands at W = 16, including the five-ones column; checks w + x + y + z = s + 2c modulo 2**16, and exactly when the top bits are clear.
// Self-checking; prints one TB_RESULT line. A free-running clock drives the
// watchdog, which fails the run after 100000 cycles.
module tb_csa42;
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
  logic [15:0] w, x, y, z, s, c;
  csa42 #(.W(16)) dut (.*);
  initial begin
    for (int n = 0; n < 5000; n++) begin
      w = 16'($urandom); x = 16'($urandom); y = 16'($urandom); z = 16'($urandom);
      if (n == 0) begin w = '1; x = '1; y = '1; z = '1; end
      if (n == 1) begin w = 16'h0003; x = 16'h0003; y = 16'h0003; z = 16'h0003; end
      if (n % 2 == 0 && n > 1) begin w[15:13] = 0; x[15:13] = 0; y[15:13] = 0; z[15:13] = 0; end
      #1;
      check(16'(w + x + y + z) == 16'(s + (c << 1)), $sformatf("mod sum %h %h %h %h", w, x, y, z));
      if (w[15:13] == 0 && x[15:13] == 0 && y[15:13] == 0 && z[15:13] == 0)
        check(18'(w) + 18'(x) + 18'(y) + 18'(z) == 18'(s) + (18'(c) << 1), "exact sum");
    end
    finish_tb();
  end
endmodule
