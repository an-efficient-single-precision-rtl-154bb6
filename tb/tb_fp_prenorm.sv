// tb_fp_prenorm: pre-normalization. Hand-picked operands of every number type and random ones; checks class, sign, effective exponent and significand.
// Self-checking; prints one TB_RESULT line. A free-running clock drives the
// watchdog, which fails the run after 100000 cycles.
module tb_fp_prenorm;
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
  fp32_t             x;
  logic              sign;
  logic signed [9:0] exp;
  logic [23:0]       sig;
  fp_class_e         cls;
  fp_prenorm dut (.*);

  function automatic fp_class_e expect_cls(logic [31:0] v);
    if (v[30:23] == 0)     return (v[22:0] == 0) ? FP_ZERO : FP_DENORMAL;
    if (v[30:23] == 8'hFF) return (v[22:0] == 0) ? FP_INF : (v[22] ? FP_QNAN : FP_SNAN);
    return FP_NORMAL;
  endfunction

  initial begin
    logic [31:0] v;
    for (int n = 0; n < 5000; n++) begin
      v = $urandom;
      case (n)
        0: v = 32'h0000_0000;  1: v = 32'h8000_0000;  2: v = 32'h0000_0001;
        3: v = 32'h007F_FFFF;  4: v = 32'h0080_0000;  5: v = 32'h7F7F_FFFF;
        6: v = 32'h7F80_0000;  7: v = 32'hFF80_0000;  8: v = 32'h7FC0_0000;
        9: v = 32'h7F80_0001;  10: v = 32'h3F80_0000;
        default: if (n % 4 == 0) v[30:23] = 0; else if (n % 4 == 1) v[30:23] = 8'hFF;
      endcase
      x = v;
      #1;
      check(cls == expect_cls(v), $sformatf("%h class %s", v, cls.name()));
      check(sign == v[31], "sign");
      check(int'(exp) == ((v[30:23] == 0) ? 1 : int'(v[30:23])), $sformatf("%h exponent %0d", v, exp));
      check(sig == {v[30:23] != 0, v[22:0]}, $sformatf("%h significand %h", v, sig));
    end
    finish_tb();
  end
endmodule
