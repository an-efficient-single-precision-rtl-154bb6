// tb_cr_pp_gen: partial product generation. Every 8-bit multiplicand with random digits; each partial product must equal the multiplicand times its digit (0..3).
// Self-checking; prints one TB_RESULT line. A free-running clock drives the
// watchdog, which fails the run after 100000 cycles.
module tb_cr_pp_gen;
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
  import fpm_pkg::*;
  logic [7:0] a;
  cr_sel_t    sel [4];
  logic [9:0] pp  [4];
  int         dig [4];
  cr_pp_gen dut (.a(a), .sel(sel), .pp(pp));
  initial begin
    for (int v = 0; v < 256; v++) begin
      for (int r = 0; r < 4; r++) begin
        a = 8'(v);
        for (int d = 0; d < 4; d++) begin
          dig[d] = (r + d + v) % 4;
          sel[d] = '{x3: dig[d] == 3, x2: dig[d] == 2, x1: dig[d] == 1};
        end
        #1;
        for (int d = 0; d < 4; d++)
          check(int'(pp[d]) == v * dig[d], $sformatf("a=%0d digit %0d pp=%0d", v, dig[d], pp[d]));
      end
    end
    finish_tb();
  end
endmodule
