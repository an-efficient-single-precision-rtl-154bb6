// cr_overlap_adder: stage 3, overlapping bit separation and final adder.
//
// Diagonal k of the block products (c0 = A0B0, c1, c2, c3 from stage 2,
// c4 = A2B2) has weight 2**(8k), so only its low 8 bits belong to byte k of
// the product; its upper bits overlap the next diagonal. Starting from c0, the
// low byte of each running total is split off as a product byte and the
// overlapping upper bits are added into the next diagonal with a carry select
// adder. The outputs are concatenated as
//   p = {Upper_mul (16 bits), Next_mul (8), Next_mul (8), Next_mul (8), Low_mul (8)}.
// The overlapping bits are taken after each diagonal has absorbed the bits
// from below, so carries travel all the way up; that ordering is this
// design's, the byte slicing and the separation itself follow the document.
// Combinational.
module cr_overlap_adder (
  input  logic [15:0] c0,
  input  logic [16:0] c1,
  input  logic [17:0] c2,
  input  logic [16:0] c3,
  input  logic [15:0] c4,
  output logic [47:0] p
);
  logic [16:0] t1;
  logic [17:0] t2;
  logic [16:0] t3;
  logic [15:0] t4;
  // carries out of the full-width adders; the bounds of the product keep
  // them zero (checked below)
  logic [3:0]  co;

  csel_adder #(.W(17)) u_ov1 (.a(c1), .b({9'd0, c0[15:8]}),  .cin(1'b0), .sum(t1), .cout(co[0]));
  csel_adder #(.W(18)) u_ov2 (.a(c2), .b({9'd0, t1[16:8]}),  .cin(1'b0), .sum(t2), .cout(co[1]));
  csel_adder #(.W(17)) u_ov3 (.a(c3), .b({7'd0, t2[17:8]}),  .cin(1'b0), .sum(t3), .cout(co[2]));
  csel_adder #(.W(16)) u_ov4 (.a(c4), .b({7'd0, t3[16:8]}),  .cin(1'b0), .sum(t4), .cout(co[3]));

  assign p = {t4, t3[7:0], t2[7:0], t1[7:0], c0[7:0]};

  always_comb assert (co == '0) else $error("cr_overlap_adder: diagonal sum out of range");
endmodule
