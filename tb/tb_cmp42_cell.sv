// tb_cmp42_cell: 4:2 compressor cell. All 32 input combinations; checks
// w + x + y + z + cin == sum + 2 (carry + cout), that cout does not depend on
// cin, and the five-ones case (sum 1, carry and cout both 1).
// Self-checking; prints one TB_RESULT line. A free-running clock drives the
// watchdog, which fails the run after 1000 cycles.
module tb_cmp42_cell;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
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

  logic w, x, y, z, cin, sum, carry, cout;
  logic cout_c0;
  cmp42_cell dut (.*);

  initial begin
    for (int v = 0; v < 32; v++) begin
      {w, x, y, z, cin} = 5'(v);
      #1;
      check(int'(w) + int'(x) + int'(y) + int'(z) + int'(cin) == int'(sum) + 2 * (int'(carry) + int'(cout)),
            $sformatf("inputs %b", 5'(v)));
      if (!cin) cout_c0 = cout;
      else      check(cout == cout_c0, "cout independent of cin");
      if (v == 31) check(sum && carry && cout, "five ones");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
