// tb_fp_mult32: end-to-end test of the single precision multiplier at its default (and only) configuration. Directed corner operands, then random operands drawn from every number type with sparse and dense fractions; result and flags are compared with the reference model. It counts how often each mechanism of the datapath occurred (exponent increment on a product MSB of 1, leading zero shift, denormal result, round up, tie to even, rounding carry into the exponent, overflow, underflow, NaN, infinity, zero, invalid, a 3A partial product, a five-ones compressor column) and fails a mechanism that never occurred.
// Self-checking; prints one TB_RESULT line. A free-running clock drives the
// watchdog, which fails the run after 400000 cycles.
module tb_fp_mult32;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
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
  fp32_t     a, b, result;
  fp_flags_t flags;
  fp_mult32 dut (.*);

  typedef enum int {
    M_MSB_SHIFT, M_LZD_SHIFT, M_DENORM_RES, M_ROUND_UP, M_TIE_EVEN, M_ROUND_CARRY,
    M_OVERFLOW, M_UNDERFLOW, M_NAN, M_INF, M_ZERO, M_INVALID, M_DIGIT3, M_FIVE_ONES, M_COUNT
  } mech_e;
  int mech [M_COUNT];

  function automatic logic [31:0] rand_operand();
    logic [31:0] v;
    v = $urandom;
    case ($urandom_range(0, 15))
      0:       v[30:23] = 0;                                   // zero or denormal
      1:       v[30:23] = 8'hFF;                               // infinity or NaN
      2:       v[30:0]  = 0;                                   // zero
      3, 4:    v[30:23] = 8'($urandom_range(1, 40));           // small exponent
      5, 6:    v[30:23] = 8'($urandom_range(200, 254));        // large exponent
      7, 8, 9: v[22:0]  = v[22:0] & 23'($urandom) & 23'($urandom) & 23'($urandom); // sparse
      10:      v[22:0]  = 23'h7F_FFFF ^ 23'($urandom_range(0, 15));  // near-all-ones fraction
      default: v[30:23] = 8'($urandom_range(64, 190));
    endcase
    if ($urandom_range(0, 3) == 0) v[10:0] = 0;                // more exact / tie cases
    return v;
  endfunction

  // Worked out from the operands, independently of the datapath: does any
  // 2-bit multiplier digit select 3A, and does any bit column of a block
  // multiplier's 4:2 compressor see five ones (four partial product bits and
  // a carry in of 1 from the column below)?
  function automatic void block_events(logic [23:0] sa, logic [23:0] sb,
                                       output logic digit3, output logic five);
    logic [15:0] row [4];
    logic        cin;
    digit3 = 1'b0;
    five   = 1'b0;
    for (int j = 0; j < 3; j++)
      for (int d = 0; d < 4; d++)
        if (sb[8*j + 2*d +: 2] == 2'b11) digit3 = 1'b1;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        for (int d = 0; d < 4; d++)
          row[d] = 16'((int'(sa[8*i +: 8]) * int'(sb[8*j + 2*d +: 2])) << (2 * d));
        cin = 1'b0;
        for (int k = 0; k < 16; k++) begin
          if (row[0][k] && row[1][k] && row[2][k] && row[3][k] && cin) five = 1'b1;
          cin = (32'(row[0][k]) + 32'(row[1][k]) + 32'(row[2][k])) >= 2;
        end
      end
  endfunction

  task automatic run(input logic [31:0] x, input logic [31:0] y);
    ref_t r;
    a = x; b = y;
    #1;
    r = mul(x, y);
    check(result == r.bits, $sformatf("%h * %h -> %h expected %h", x, y, result, r.bits));
    check(flags == {r.invalid, r.overflow, r.underflow, r.inexact},
          $sformatf("%h * %h flags %b expected %b%b%b%b", x, y, flags, r.invalid, r.overflow, r.underflow, r.inexact));
    // mechanism coverage, read from inside the datapath for finite non-zero operands
    if (!is_nan(x) && !is_nan(y) && !is_inf(x) && !is_inf(y) && !is_zero(x) && !is_zero(y)) begin
      logic d3, f5;
      block_events({x[30:23] != 0, x[22:0]}, {y[30:23] != 0, y[22:0]}, d3, f5);
      if (d3) mech[M_DIGIT3]++;
      if (f5) mech[M_FIVE_ONES]++;
      if (dut.u_calc.p[47])       mech[M_MSB_SHIFT]++;
      if (dut.u_post.lz > 1)      mech[M_LZD_SHIFT]++;
      if (dut.u_post.rup)         mech[M_ROUND_UP]++;
      if (dut.u_post.guard && !dut.u_post.sticky) mech[M_TIE_EVEN]++;
      if (dut.u_post.rup && dut.u_post.packed_rnd[30:23] != dut.u_post.packed_pre[30:23]) mech[M_ROUND_CARRY]++;
    end
    if (result.exp == 0 && result.frac != 0) mech[M_DENORM_RES]++;
    if (flags.overflow)  mech[M_OVERFLOW]++;
    if (flags.underflow) mech[M_UNDERFLOW]++;
    if (flags.invalid)   mech[M_INVALID]++;
    if (is_nan(result))  mech[M_NAN]++;
    if (is_inf(result))  mech[M_INF]++;
    if (is_zero(result)) mech[M_ZERO]++;
  endtask

  initial begin
    // directed cases
    run(32'h3FC0_0000, 32'h4000_0000);   // 1.5 * 2 = 3
    run(32'h3F80_0001, 32'h3F80_0001);   // (1 + 2**-23)**2, rounds to 1 + 2**-22
    run(32'h3FFF_FFFF, 32'h3FFF_FFFF);   // MSB of product set
    run(32'h3FFF_FFFF, 32'h3F80_0001);   // rounding carries into the exponent
    run(32'h0000_0001, 32'h3F00_0000);   // tie to even: underflows to zero
    run(32'h0000_0003, 32'h3F00_0000);   // tie to even: rounds up to 2 ulp
    run(32'h00FF_FFFF, 32'h3F00_0000);   // denormal rounding up to the smallest normal
    run(32'h0000_0001, 32'h4B00_0000);   // denormal operand: long leading zero shift
    run(32'h7F7F_FFFF, 32'h4000_0000);   // overflow
    run(32'h0080_0000, 32'h0080_0000);   // underflow to zero
    run(32'h7F80_0000, 32'h0000_0000);   // infinity * zero: invalid
    run(32'hFF80_0000, 32'h3F80_0000);   // -infinity
    run(32'h7FC0_0000, 32'h3F80_0000);   // quiet NaN
    run(32'h7F80_0001, 32'h3F80_0000);   // signalling NaN: invalid
    run(32'h8000_0000, 32'h4120_0000);   // -0 * 10
    run(32'hC040_0000, 32'h4040_0000);   // -3 * 3
    for (int n = 0; n < 300000; n++) run(rand_operand(), rand_operand());

    for (int m = 0; m < M_COUNT; m++) begin
      mech_e me;
      me = mech_e'(m);
      $display("mechanism %-14s occurred %0d times", me.name(), mech[m]);
      check(mech[m] > 0, $sformatf("mechanism %s never occurred", me.name()));
    end
    finish_tb();
  end
endmodule
