// tb_cr_block_mult8: 8x8 block multiplier, fed by the recoder as in the full design. All 65536 operand pairs; p must equal a * b.
// Self-checking; prints one TB_RESULT line. A free-running clock drives the
// watchdog, which fails the run after 200000 cycles.
module tb_cr_block_mult8;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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
  logic [7:0]  a, b;
  cr_sel_t     sel [4];
  logic [15:0] p;
  cr_encoder     u_enc (.b(b), .sel(sel));
  cr_block_mult8 dut   (.a(a), .sel(sel), .p(p));
  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        check(int'(p) == i * j, $sformatf("%0d * %0d = %0d", i, j, p));
      end
    finish_tb();
  end
endmodule
