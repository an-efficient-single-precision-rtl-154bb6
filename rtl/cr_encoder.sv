// cr_encoder: classical (non-overlapping) recoding of an N-bit multiplier
// block.
//
// The block is cut into N/2 two-bit digits with no shared bit between
// neighbours (unlike radix-4 Booth, which overlaps one bit and needs negative
// multiples). Each digit is decoded into a one-hot select of the multiple of
// the multiplicand it stands for: 00 -> zero, 01 -> A, 10 -> 2A, 11 -> 3A.
// The meaning of each digit follows the document's recoding table; the
// one-hot form of the output is this design's choice. Combinational.
module cr_encoder
  import fpm_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]    b,
  output cr_sel_t         sel [N/2]
);
  for (genvar d = 0; d < N / 2; d++) begin : g_digit
    always_comb begin
      sel[d] = '0;
      unique case (b[2*d +: 2])
        2'b00: sel[d]    = '0;
        2'b01: sel[d].x1 = 1'b1;
        2'b10: sel[d].x2 = 1'b1;
        2'b11: sel[d].x3 = 1'b1;
      endcase
    end
  end

  initial assert (N % 2 == 0) else $error("cr_encoder: N must be even");
endmodule
