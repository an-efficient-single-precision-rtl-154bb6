// tb_csel_adder: carry select adder. Random operands and carry in at the default 16 bits and at 13 bits (a short last block); checks {cout, sum} = a + b + cin.
// Self-checking; prints one TB_RESULT line. A free-running clock drives the
// watchdog, which fails the run after 100000 cycles.
module tb_csel_adder;
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
  logic [15:0] a, b, sum;
  logic        cin, cout;
  logic [12:0] a2, b2, sum2;
  logic        cin2, cout2;
  csel_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  csel_adder #(.W(13), .BLK(4)) dut2 (.a(a2), .b(b2), .cin(cin2), .sum(sum2), .cout(cout2));
  initial begin
    for (int n = 0; n < 5000; n++) begin
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
      a2 = 13'($urandom); b2 = 13'($urandom); cin2 = 1'($urandom);
      if (n == 0) begin a = '1; b = 0; cin = 1; a2 = '1; b2 = 0; cin2 = 1; end
      #1;
      check({cout, sum} == 17'(a) + 17'(b) + 17'(cin), $sformatf("16b %h+%h+%0d", a, b, cin));
      check({cout2, sum2} == 14'(a2) + 14'(b2) + 14'(cin2), $sformatf("13b %h+%h+%0d", a2, b2, cin2));
    end
    finish_tb();
  end
endmodule
