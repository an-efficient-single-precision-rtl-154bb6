// cr_pp_gen: partial product generation of one N x N block multiplier.
//
// From the N-bit multiplicand block A it forms the three non-zero multiples
// the classical recoding can ask for: A with a 0 prepended as MSB (1A), A with
// a 0 appended as LSB (2A), and their sum (3A), the last from one carry select
// adder. Each of the N/2 digit selects then picks one multiple, or zero.
// 3A needs N+2 bits, so every partial product is N+2 bits wide; they are
// given unshifted (digit d has weight 4**d, applied by the caller).
// Combinational. The multiples follow the document; the width is this
// design's consequence of 3A.
module cr_pp_gen
  import fpm_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  cr_sel_t        sel [N/2],
  output logic [N+1:0]   pp  [N/2]
);
  logic [N+1:0] m1, m2, m3;
  logic         m3_cout;

  assign m1 = {2'b00, a};          // '0' concatenated as MSB
  assign m2 = {1'b0, a, 1'b0};     // '0' concatenated as LSB

  csel_adder #(.W(N + 2), .BLK(4)) u_triple (
    .a(m1), .b(m2), .cin(1'b0), .sum(m3), .cout(m3_cout)
  );

  for (genvar d = 0; d < N / 2; d++) begin : g_pp
    always_comb begin
      pp[d] = ({(N + 2){sel[d].x1}} & m1)
            | ({(N + 2){sel[d].x2}} & m2)
            | ({(N + 2){sel[d].x3}} & m3);
    end
  end

  // 3A of an N-bit value always fits in N+2 bits.
  always_comb assert (!m3_cout) else $error("cr_pp_gen: 3A overflow");
endmodule
