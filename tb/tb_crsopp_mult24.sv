// tb_crsopp_mult24: 24x24 CRSOPP significand multiplier. Corner operands (all ones, single bits, hidden-bit patterns) and random operands; p must equal a * b.
// Self-checking; prints one TB_RESULT line. A free-running clock drives the
// watchdog, which fails the run after 100000 cycles.
module tb_crsopp_mult24;
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
  logic [23:0] a, b;
  logic [47:0] p;
  crsopp_mult24 dut (.*);
  initial begin
    for (int n = 0; n < 20000; n++) begin
      a = 24'($urandom); b = 24'($urandom);
      case (n)
        0: begin a = '1; b = '1; end
        1: begin a = 24'h800000; b = 24'h800000; end
        2: begin a = 0; b = '1; end
        3: begin a = 24'hAAAAAA; b = 24'h555555; end
        4: begin a = 24'h000001; b = 24'hFFFFFF; end
        default: if (n % 3 == 0) begin a[23] = 1'b1; b[23] = 1'b1; end
      endcase
      #1;
      check(longint'(p) == longint'(a) * longint'(b), $sformatf("%h * %h -> %h", a, b, p));
    end
    finish_tb();
  end
endmodule
