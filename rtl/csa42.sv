// csa42: W-bit 4:2 carry save adder, a row of W cmp42_cell compressors.
//
// Each cell adds one bit of w, x, y and z plus the cout of the cell below
// (the lowest cell takes 0). Its cout goes to the next cell's cin. Because a
// cell's cout depends only on its own w, x, y, nothing ripples along the row.
// The row yields a sum vector s and a carry vector c of double weight:
//   w + x + y + z == s + (c << 1), modulo 2**W.
// The cout of the top cell falls outside the W-bit field and is dropped
// (reported as unused by lint). Combinational.
module csa42 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] w,
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W:0] k;   // k[i] is the carry into cell i

  assign k[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_cell
    cmp42_cell u_cell (
      .w(w[i]), .x(x[i]), .y(y[i]), .z(z[i]), .cin(k[i]),
      .sum(s[i]), .carry(c[i]), .cout(k[i+1])
    );
  end
endmodule
