// haar_synthesis -- one reconstruction step of the stationary Haar wavelet
// transform, with soft thresholding of the detail coefficients.
//
// In an undecimated transform every sample of A_j can be rebuilt twice:
// from index n (A_{j+1}[n] + D_{j+1}[n]) and from index n + 2^j
// (A_{j+1}[n+2^j] - D_{j+1}[n+2^j]). The step averages both estimates,
// which is the usual inverse SWT and makes the thresholding act like a
// shift-averaged de-noiser:
//   y = floor((a0 + T(d0) + a1 - T(d1)) / 2)
// with a0/d0 taken at n, a1/d1 at n + 2^j, and the soft threshold
//   T(d) = sign(d) * max(|d| - thr, 0).
// With thr = 0 the step inverts haar_analysis to within one LSB. Soft
// thresholding is this design's choice of how the details are de-noised.
// Purely combinational.
module haar_synthesis
  import holter_pkg::*;
(
  input  sample_t a0,   // A_{j+1}[n]
  input  sample_t d0,   // D_{j+1}[n]
  input  sample_t a1,   // A_{j+1}[n + 2^j]
  input  sample_t d1,   // D_{j+1}[n + 2^j]
  input  thr_t    thr,  // threshold magnitude for this level
  output sample_t y     // A_j[n]
);

  function automatic logic signed [DW:0] soft_thr(input sample_t d, input thr_t t);
    logic signed [DW+1:0] mag, red;
    mag = d[DW-1] ? -(DW+2)'(d) : (DW+2)'(d);
    red = mag - $signed({2'b00, t});
    if (red <= 0) return '0;
    return d[DW-1] ? -(DW+1)'(red) : (DW+1)'(red);
  endfunction

  logic signed [DW+2:0] acc;

  always_comb begin
    acc = (DW+3)'(a0) + (DW+3)'(soft_thr(d0, thr)) + (DW+3)'(a1) - (DW+3)'(soft_thr(d1, thr));
    y   = sample_t'(acc >>> 1);
  end

endmodule
