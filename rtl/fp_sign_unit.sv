// fp_sign_unit: sign of the product, the exclusive OR of the operand signs,
// as in the document. Combinational.
module fp_sign_unit (
  input  logic sa,
  input  logic sb,
  output logic s
);
  assign s = sa ^ sb;
endmodule
