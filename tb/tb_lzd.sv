// tb_lzd: leading zero detector at W = 48. Every leading-one position with random lower bits, and zero.
// Self-checking; prints one TB_RESULT line. A free-running clock drives the
// watchdog, which fails the run after 100000 cycles.
module tb_lzd;
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
  logic [47:0] x;
  logic [5:0]  count;
  lzd #(.W(48)) dut (.*);
  initial begin
    x = 0; #1; check(count == 6'd48, "zero input");
    for (int pos = 0; pos < 48; pos++)
      for (int r = 0; r < 20; r++) begin
        x = {$urandom, $urandom};
        x = x & ((48'd1 << pos) - 1);
        x[pos] = 1'b1;
        #1;
        check(int'(count) == 47 - pos, $sformatf("leading one at %0d: count %0d", pos, count));
      end
    finish_tb();
  end
endmodule
