// haar_analysis -- one analysis step of the stationary (undecimated) Haar
// wavelet transform.
//
// At level j the Haar low-pass and high-pass filters have two non-zero
// taps, 2^j samples apart (the filters are up-sampled by inserting zeros
// instead of decimating the sub-bands). Given the current sample a = A_j[n]
// and the earlier one b = A_j[n - 2^j], the step returns
//   approx = floor((a + b) / 2)   -> A_{j+1}[n]
//   detail = floor((a - b) / 2)   -> D_{j+1}[n]
// The 1/2 scale (instead of 1/sqrt(2)) keeps every level in the input's
// range, so no word growth and no multiplier is needed; it is this design's
// choice of normalisation. Purely combinational; the sum is formed one bit
// wider so it cannot overflow.
module haar_analysis
  import holter_pkg::*;
(
  input  sample_t a,       // A_j[n]
  input  sample_t b,       // A_j[n - 2^j]
  output sample_t approx,  // A_{j+1}[n]
  output sample_t detail   // D_{j+1}[n]
);

  logic signed [DW:0] sum, diff;

  always_comb begin
    sum    = {a[DW-1], a} + {b[DW-1], b};
    diff   = {a[DW-1], a} - {b[DW-1], b};
    approx = sample_t'(sum >>> 1);
    detail = sample_t'(diff >>> 1);
  end

endmodule
