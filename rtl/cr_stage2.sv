// cr_stage2: stage 2 of the block product accumulation (diagonal adders).
//
// The nine 16-bit block products AiBj of the split 24x24 multiplication are
// grouped by weight 2**(8(i+j)). The three middle diagonals are summed with
// carry select adders: c1 = A1B0 + A0B1, c2 = A2B0 + A1B1 + A0B2 (two chained
// adders) and c3 = A2B1 + A1B2. The two outer products A0B0 and A2B2 need no
// addition here and go straight to stage 3. The sums keep their carry bits
// (17, 18 and 17 bits) so nothing is lost; the document speaks of 16-bit
// outputs here, the extra carry bits are this design's. The grouping into
// diagonals and the two chained adders of the middle one follow the document.
// Combinational.
// Input pb[i][j] is Ai x Bj.
module cr_stage2 (
  input  logic [15:0] pb [3][3],
  output logic [16:0] c1,
  output logic [17:0] c2,
  output logic [16:0] c3
);
  logic [16:0] t2;

  csel_adder #(.W(16)) u_d1  (.a(pb[1][0]), .b(pb[0][1]), .cin(1'b0), .sum(c1[15:0]), .cout(c1[16]));
  csel_adder #(.W(16)) u_d2a (.a(pb[2][0]), .b(pb[1][1]), .cin(1'b0), .sum(t2[15:0]), .cout(t2[16]));
  csel_adder #(.W(17)) u_d2b (.a(t2), .b({1'b0, pb[0][2]}), .cin(1'b0), .sum(c2[16:0]), .cout(c2[17]));
  csel_adder #(.W(16)) u_d3  (.a(pb[2][1]), .b(pb[1][2]), .cin(1'b0), .sum(c3[15:0]), .cout(c3[16]));
endmodule
