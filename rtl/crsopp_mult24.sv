// crsopp_mult24: 24 x 24 unsigned significand multiplier with classical
// recoding and split operands processed in parallel (CRSOPP).
//
// The splitter cuts a (multiplicand) and b (multiplier) into three 8-bit
// blocks A0..A2 and B0..B2. Each Bj is recoded by its own cr_encoder into four
// non-overlapping 2-bit digits. All nine 8x8 block products AiBj are formed
// in parallel by cr_block_mult8 (partial products from {0, A, 2A, 3A}, one 4:2
// CSA, one carry select adder: stage 1). cr_stage2 sums the products of equal
// weight (stage 2) and cr_overlap_adder folds the overlapping upper bits of
// each diagonal into the next and concatenates the 48-bit product (stage 3).
// No sign handling, sign extension or two's complement is needed, since the
// significands are unsigned. Purely combinational, as in the document, which
// reports no registers for the whole multiplier.
// BLK and NBLK document the 3 x 8 split; the structure is written for it.
module crsopp_mult24
  import fpm_pkg::*;
#(
  parameter int unsigned BLK  = 8,
  parameter int unsigned NBLK = 3
) (
  input  logic [BLK*NBLK-1:0]   a,
  input  logic [BLK*NBLK-1:0]   b,
  output logic [2*BLK*NBLK-1:0] p
);
  logic [BLK-1:0]   ablk [NBLK];
  logic [BLK-1:0]   bblk [NBLK];
  cr_sel_t          bsel [NBLK][BLK/2];
  logic [2*BLK-1:0] pb   [3][3];
  logic [16:0]      c1, c3;
  logic [17:0]      c2;

  // splitter
  for (genvar i = 0; i < NBLK; i++) begin : g_split
    assign ablk[i] = a[BLK*i +: BLK];
    assign bblk[i] = b[BLK*i +: BLK];
  end

  // proposed encoding of every multiplier block
  for (genvar j = 0; j < NBLK; j++) begin : g_enc
    cr_encoder #(.N(BLK)) u_enc (.b(bblk[j]), .sel(bsel[j]));
  end

  // nine block multiplications in parallel
  for (genvar i = 0; i < NBLK; i++) begin : g_row
    for (genvar j = 0; j < NBLK; j++) begin : g_col
      cr_block_mult8 #(.N(BLK)) u_bm (.a(ablk[i]), .sel(bsel[j]), .p(pb[i][j]));
    end
  end

  cr_stage2 u_stage2 (.pb(pb), .c1(c1), .c2(c2), .c3(c3));

  cr_overlap_adder u_stage3 (
    .c0(pb[0][0]), .c1(c1), .c2(c2), .c3(c3), .c4(pb[2][2]), .p(p)
  );

  initial assert (BLK == 8 && NBLK == 3)
    else $error("crsopp_mult24: written for three 8-bit blocks");
endmodule
