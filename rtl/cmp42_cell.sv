// cmp42_cell: one bit of a 4:2 carry save adder (4:2 compressor).
//
// Five inputs of equal weight (w, x, y, z and the carry in from the next
// lower bit) give one sum bit and two carry bits of double weight:
//   w + x + y + z + cin == sum + 2 * (carry + cout).
// It is two full adders (3:2 CSAs). The first adds w, x and y and its carry
// is cout, which therefore depends on w, x, y only and never on cin, so a row
// of cells has no carry ripple. The second adds the first sum, z and cin and
// gives sum and carry. Five ones in a column give sum 1 and the carry
// binary 10 as two separate ones, cout and carry. Ports as in the document's
// 4:2 block; the split into two full adders follows its text. Combinational.
module cmp42_cell (
  input  logic w,
  input  logic x,
  input  logic y,
  input  logic z,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s0;

  csa32 #(.W(1)) u_fa0 (.x(w),  .y(x), .z(y),   .s(s0),  .c(cout));
  csa32 #(.W(1)) u_fa1 (.x(s0), .y(z), .z(cin), .s(sum), .c(carry));
endmodule
