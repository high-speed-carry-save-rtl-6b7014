// conv_adder: output adder of the linear convolution.
//
// The multipliers deliver every cross product prod[k][m] = x[k] * h[m]. Output
// sample y[n] is the convolution sum over all pairs with k + m = n,
//   y[n] = sum_{k} x[k] h[n-k],  n = 0 .. L+M-2,
// so output n adds min(n+1, L, M, L+M-1-n) products. Each output has its own
// multi-operand adder; it is written as a behavioural sum and left to
// synthesis, since only the function of the adder is fixed. Sums wider than
// Y_W bits keep their low Y_W bits.
//
// Interface: prod[L][M] (P_W bits each) in; y[L+M-1] (Y_W bits each) out.
// Timing: combinational.
module conv_adder #(
  parameter int unsigned L   = lconv_pkg::SEQ_L,
  parameter int unsigned M   = lconv_pkg::SEQ_M,
  parameter int unsigned P_W = 2 * lconv_pkg::SAMPLE_W,
  parameter int unsigned Y_W = lconv_pkg::Y_W
) (
  input  logic [P_W-1:0] prod [L][M],
  output logic [Y_W-1:0] y    [L+M-1]
);

  always_comb begin
    for (int n = 0; n < int'(L + M - 1); n++) begin
      y[n] = '0;
      for (int k = 0; k < int'(L); k++) begin
        if (n - k >= 0 && n - k < int'(M)) begin
          y[n] = y[n] + Y_W'(prod[k][n-k]);
        end
      end
    end
  end

endmodule
