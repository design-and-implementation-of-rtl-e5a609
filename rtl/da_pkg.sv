// da_pkg: constants shared by the distributed-arithmetic (DA) FIR filter.
//
// The filter is a 32-tap (order 31) linear-phase low-pass FIR with 12-bit
// two's-complement input, built from four 16-entry look-up tables. Tap count,
// input width, the number of LUTs and the pipeline depth between the
// shift-register output and the accumulator are as the filter's structure
// gives them. The coefficient width (12 bits) and the coefficient values are
// this design's own choice: a Hamming-windowed sinc with cutoff 0.2*fs,
// normalised to unity DC gain and rounded to Q1.11,
//   h[n] = round(2048 * w[n]*s[n] / sum_k(w[k]*s[k])),
//   s[n] = sin(2*pi*0.2*m)/(pi*m) (0.4 at m=0), m = n - 15.5,
//   w[n] = 0.54 - 0.46*cos(2*pi*n/31),            n = 0..31.
// Only h[0..15] is stored: the impulse response is symmetric, h[31-n] = h[n].
package da_pkg;

  localparam int DEF_TAPS   = 32;  // filter length (order 31)
  localparam int DEF_IN_W   = 12;  // input sample width
  localparam int DEF_COEF_W = 12;  // coefficient width (Q1.11)
  localparam int NUM_LUT    = 4;   // divided LUT: four small tables
  localparam int PIPE_DEPTH = 3;   // LUT reg, adder level 1, adder level 2

  // h[0..15] of the default low-pass filter
  localparam logic signed [DEF_COEF_W-1:0] DEF_COEF [DEF_TAPS/2] = '{
    12'sd2,   -12'sd2,  -12'sd5,   12'sd0,   12'sd12,  12'sd11, -12'sd15, -12'sd34,
    12'sd0,    12'sd63,  12'sd52, -12'sd70, -12'sd158, 12'sd0,   12'sd405, 12'sd765
  };

endpackage
