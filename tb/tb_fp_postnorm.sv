// tb_fp_postnorm: post-normalization. Drives sign, exponent and product directly: random finite cases over the whole exponent range (normal, denormal, overflow results), ties, and special operand classes. The expected value is the exact real p * 2**(e - 173) rounded by the reference model.
// Self-checking; prints one TB_RESULT line. A free-running clock drives the
// watchdog, which fails the run after 200000 cycles.
module tb_fp_postnorm;
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
  import fp_ref_pkg::*;
  logic              s;
  logic signed [9:0] e;
  logic [47:0]       p;
  fp_class_e         cls_a, cls_b;
  fp32_t             result;
  fp_flags_t         flags;
  fp_postnorm dut (.*);

  initial begin
    ref_t   r;
    real    v;
    int     ei;
    for (int n = 0; n < 20000; n++) begin
      s  = 1'($urandom);
      ei = $urandom_range(0, 480) - 180;     // e = ea + eb - 127 spans -125..381
      p  = {$urandom, $urandom};
      case (n % 5)
        0: p[47] = 1'b1;
        1: begin p[47] = 1'b0; p[46] = 1'b1; end
        2: p = p >> $urandom_range(2, 40);
        3: begin p[47] = 1'b1; p[22:0] = 0; p[23] = 1'b1; end    // exact tie
        default: ;
      endcase
      if (p == 0) p = 48'd1;
      e = 10'(ei);
      cls_a = FP_NORMAL; cls_b = FP_NORMAL;
      #1;
      // value = p * 2**(e - 127 - 46); e + 1023 - 173 is the double exponent of 2**(e-173)
      v = real'(p) * $bitstoreal({1'b0, 11'(ei + 1023 - 173), 52'd0});
      r = r2f(s ? -v : v, s);
      check(result == r.bits, $sformatf("e=%0d p=%h -> %h expected %h", ei, p, result, r.bits));
      check(flags == {1'b0, r.overflow, r.underflow, r.inexact},
            $sformatf("flags e=%0d p=%h -> %b expected %b%b%b", ei, p, flags, r.overflow, r.underflow, r.inexact));
    end
    // special classes
    e = 10'(0); p = 48'h8000_0000_0000; s = 1'b1;
    cls_a = FP_INF;  cls_b = FP_NORMAL; #1; check(result == 32'hFF80_0000 && flags == 0, "inf x normal");
    cls_a = FP_ZERO; cls_b = FP_NORMAL; #1; check(result == 32'h8000_0000 && flags == 0, "zero x normal");
    cls_a = FP_ZERO; cls_b = FP_INF;    #1; check(result == QNAN && flags.invalid, "zero x inf");
    cls_a = FP_QNAN; cls_b = FP_NORMAL; #1; check(result == QNAN && !flags.invalid, "qnan");
    cls_a = FP_NORMAL; cls_b = FP_SNAN; #1; check(result == QNAN && flags.invalid, "snan");
    cls_a = FP_DENORMAL; cls_b = FP_ZERO; #1; check(result == 32'h8000_0000, "denormal x zero");
    finish_tb();
  end
endmodule
