// lconv_pkg: default sizes shared by the linear convolution datapath.
//
// The example design convolves a 4-sample input sequence x[n] with a
// 4-sample impulse response h[n]; every sample is a 4-bit unsigned number and
// every output sample is 8 bits wide, which is what the published simulation
// shows (x and h as [3:0] buses, y as [7:0] buses). The output length follows
// from the sequence lengths as L + M - 1. Everything here is a default only:
// each module takes these values as parameter defaults and may be resized.
package lconv_pkg;

  // Sample width of x[n] and h[n] (bits, unsigned).
  localparam int unsigned SAMPLE_W = 4;
  // Length L of the input sequence and M of the impulse response.
  localparam int unsigned SEQ_L    = 4;
  localparam int unsigned SEQ_M    = 4;
  // Width of one output sample y[n]. Sums that do not fit wrap modulo 2**Y_W.
  localparam int unsigned Y_W      = 8;

  // Length of the output sequence, N = L + M - 1.
  function automatic int unsigned out_len(int unsigned l, int unsigned m);
    return l + m - 1;
  endfunction

endpackage
