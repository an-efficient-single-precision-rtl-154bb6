// tb_cr_encoder: classical recoder. All 256 multiplier blocks; each digit must give a one-hot (or empty) select whose multiple equals the digit.
// Self-checking; prints one TB_RESULT line. A free-running clock drives the
// watchdog, which fails the run after 100000 cycles.
module tb_cr_encoder;
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
  logic [7:0] b;
  cr_sel_t    sel [4];
  cr_encoder dut (.b(b), .sel(sel));
  initial begin
    for (int v = 0; v < 256; v++) begin
      b = 8'(v);
      #1;
      for (int d = 0; d < 4; d++) begin
        int m;
        m = (sel[d].x1 ? 1 : 0) + (sel[d].x2 ? 2 : 0) + (sel[d].x3 ? 3 : 0);
        check(m == ((v >> (2 * d)) & 3), $sformatf("b=%h digit %0d multiple %0d", v, d, m));
        check(32'(sel[d].x1) + 32'(sel[d].x2) + 32'(sel[d].x3) <= 1, "at most one select");
      end
    end
    finish_tb();
  end
endmodule
