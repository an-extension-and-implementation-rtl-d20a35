// mwm_lzd: leading zero detector.
//
// Returns the number of leading (most significant) zero bits of d, or W when
// d is zero. The reducer uses it to skip over runs of zeros in its
// shift-and-add register so that a whole run is shifted out in one cycle.
// The function (count the leading zeros) is what the reducer needs; the
// implementation, a plain priority scan that synthesis turns into a priority
// encoder, is this design's own. Purely combinational.
module mwm_lzd #(
  parameter int unsigned W  = 384,
  parameter int unsigned CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  d,
  output logic [CW-1:0] lz
);

  always_comb begin
    lz = CW'(W);
    // Scan from LSB to MSB: the last 1 found is the most significant one.
    for (int unsigned i = 0; i < W; i++) begin
      if (d[i]) lz = CW'(W - 1 - i);
    end
  end

endmodule
