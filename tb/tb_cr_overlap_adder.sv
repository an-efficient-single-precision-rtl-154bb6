// tb_cr_overlap_adder: stage 3 overlap adder. Diagonal sums are built from random 24-bit operands cut into bytes (as the earlier stages deliver them); the output must be the 48-bit product.
// Self-checking; prints one TB_RESULT line. A free-running clock drives the
// watchdog, which fails the run after 100000 cycles.
module tb_cr_overlap_adder;
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
  logic [15:0] c0, c4;
  logic [16:0] c1, c3;
  logic [17:0] c2;
  logic [47:0] p;
  logic [23:0] a, b;
  longint      ab [3][3];
  cr_overlap_adder dut (.*);
  initial begin
    for (int n = 0; n < 5000; n++) begin
      a = 24'($urandom); b = 24'($urandom);
      if (n == 0) begin a = '1; b = '1; end
      if (n == 1) begin a = 24'h0000FF; b = 24'hFF00FF; end
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
        ab[i][j] = longint'(a[8*i +: 8]) * longint'(b[8*j +: 8]);
      c0 = 16'(ab[0][0]);
      c1 = 17'(ab[1][0] + ab[0][1]);
      c2 = 18'(ab[2][0] + ab[1][1] + ab[0][2]);
      c3 = 17'(ab[2][1] + ab[1][2]);
      c4 = 16'(ab[2][2]);
      #1;
      check(longint'(p) == longint'(a) * longint'(b), $sformatf("%h * %h -> %h", a, b, p));
    end
    finish_tb();
  end
endmodule
