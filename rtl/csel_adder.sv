// csel_adder: W-bit carry select adder, sum = a + b + cin.
//
// The operands are cut into blocks of BLK bits. The lowest block is a plain
// ripple adder fed by cin. Every higher block is computed twice, once for an
// incoming carry of 0 and once for 1, and the real carry from the block below
// picks one result, so the carry crosses each block through one multiplexer.
// Used for every two-operand (carry propagate) addition in the multiplier.
// The block size and width defaults are this design's choice. Combinational.
module csel_adder #(
  parameter int unsigned W   = 16,
  parameter int unsigned BLK = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NB = (W + BLK - 1) / BLK;

  // carry into each block
  logic [NB:0] carry;

  assign carry[0] = cin;

  for (genvar k = 0; k < NB; k++) begin : g_blk
    localparam int unsigned LO = k * BLK;
    localparam int unsigned HI = ((k + 1) * BLK < W) ? (k + 1) * BLK - 1 : W - 1;
    localparam int unsigned BW = HI - LO + 1;

    if (k == 0) begin : g_ripple
      logic [BW:0] rc;
      assign rc = {1'b0, a[HI:LO]} + {1'b0, b[HI:LO]} + {{BW{1'b0}}, cin};
      assign sum[HI:LO]  = rc[BW-1:0];
      assign carry[k+1]  = rc[BW];
    end else begin : g_select
      logic [BW:0] r0, r1;
      assign r0 = {1'b0, a[HI:LO]} + {1'b0, b[HI:LO]};
      assign r1 = {1'b0, a[HI:LO]} + {1'b0, b[HI:LO]} + {{BW{1'b0}}, 1'b1};
      assign sum[HI:LO]  = carry[k] ? r1[BW-1:0] : r0[BW-1:0];
      assign carry[k+1]  = carry[k] ? r1[BW] : r0[BW];
    end
  end

  assign cout = carry[NB];
endmodule
