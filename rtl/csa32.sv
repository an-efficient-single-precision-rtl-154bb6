// csa32: W-bit 3:2 carry save adder.
//
// Every bit position is an independent full adder: s is the bitwise sum of
// x, y and z and c the bitwise carry, which has twice the weight of s, so
// x + y + z == s + (c << 1). No carry travels between positions, which is
// what lets the partial products of a block be added without a carry chain.
// Purely combinational. The width default is this design's choice.
module csa32 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  always_comb begin
    s = x ^ y ^ z;
    c = (x & y) | (x & z) | (y & z);
  end
endmodule
