// tb_fp_calc_unit: calculation unit. Random signs, exponents and significands; checks the sign XOR, ea + eb - 127 and the 48-bit product.
// Self-checking; prints one TB_RESULT line. A free-running clock drives the
// watchdog, which fails the run after 100000 cycles.
module tb_fp_calc_unit;
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
  logic              sa, sb, s;
  logic signed [9:0] ea, eb, e;
  logic [23:0]       siga, sigb;
  logic [47:0]       p;
  fp_calc_unit dut (.*);
  initial begin
    for (int n = 0; n < 10000; n++) begin
      sa = 1'($urandom); sb = 1'($urandom);
      ea = 10'($urandom_range(1, 254)); eb = 10'($urandom_range(1, 254));
      siga = 24'($urandom); sigb = 24'($urandom);
      if (n % 2 == 0) begin siga[23] = 1'b1; sigb[23] = 1'b1; end
      #1;
      check(s == (sa ^ sb), "sign");
      check(int'(e) == int'(ea) + int'(eb) - 127, "exponent");
      check(longint'(p) == longint'(siga) * longint'(sigb), $sformatf("%h * %h -> %h", siga, sigb, p));
    end
    finish_tb();
  end
endmodule
