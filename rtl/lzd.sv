// lzd: leading zero detector.
//
// count is the number of zeros above the most significant 1 of x, or W when
// x is all zero. A priority scan from the LSB up: the last 1 seen is the
// leading one. Used by post-normalization on the 48-bit significand product.
// The document names the detector; the scan is this design's. Combinational.
module lzd #(
  parameter int unsigned W  = 48,
  localparam int unsigned CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  x,
  output logic [CW-1:0] count
);
  always_comb begin
    count = CW'(W);
    for (int unsigned i = 0; i < W; i++) begin
      if (x[i]) count = CW'(W - 1 - i);
    end
  end
endmodule
