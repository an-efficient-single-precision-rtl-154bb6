// cr_block_mult8: one N x N block multiplier of the split-operand scheme
// (N = 8 gives the nine 8x8 blocks of the 24x24 significand product).
//
// The digit selects of the multiplier block come from cr_encoder. cr_pp_gen
// turns them into four partial products, which are placed two bits apart
// (weights 1, 4, 16, 64) in a 2N-bit field. One 4:2 carry save adder, built
// from two 3:2 stages, reduces the four rows to a sum and a carry vector, and a
// carry select adder resolves them into the 2N-bit product. The product is
// below 2**(2N), so the field is exact modulo 2**(2N); the carry out of the
// adder and the top carry bit of the CSA are weight 2**(2N) and are dropped on
// purpose (the lint reports them as unused).
// Combinational. Structure as described in the document (stage 1); the choice
// of one 4:2 reduction followed by a carry select adder is this design's.
module cr_block_mult8
  import fpm_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  cr_sel_t        sel [N/2],
  output logic [2*N-1:0] p
);
  localparam int unsigned W = 2 * N;

  logic [N+1:0] pp  [N/2];
  logic [W-1:0] row [N/2];
  logic [W-1:0] s, c, c_sh;
  logic         cout;

  cr_pp_gen #(.N(N)) u_ppgen (.a(a), .sel(sel), .pp(pp));

  for (genvar d = 0; d < N / 2; d++) begin : g_row
    assign row[d] = W'({{(W - N - 2){1'b0}}, pp[d]} << (2 * d));
  end

  csa42 #(.W(W)) u_csa (.w(row[0]), .x(row[1]), .y(row[2]), .z(row[3]), .s(s), .c(c));

  assign c_sh = {c[W-2:0], 1'b0};

  csel_adder #(.W(W), .BLK(4)) u_cpa (.a(s), .b(c_sh), .cin(1'b0), .sum(p), .cout(cout));

  initial assert (N == 8) else $error("cr_block_mult8: the 4:2 reduction is written for four partial products (N = 8)");
endmodule
