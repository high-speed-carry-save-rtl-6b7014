// linear_conv: linear convolution y = x * h built from carry save multipliers
// and an output adder.
//
// Every pair of an input sample x[k] and an impulse response sample h[m] is
// multiplied by its own csa_vedic_mult (L*M multipliers), and conv_adder adds
// the products with k + m = n into output sample y[n]. Both sequences start at
// time 0, so y has L + M - 1 samples and starts at n = 0. The whole datapath
// is combinational: y follows x and h after the multiplier and adder delays,
// with no clock, registers or handshake. That, the unsigned samples and the
// wrap-around of y[n] modulo 2**Y_W are this design's reading; the multiplier
// into adder structure and the default sizes (4 samples of 4 bits each,
// 8-bit outputs) follow the reference design.
//
// Interface: x[L], h[M] (SAMPLE_W bits each, unsigned) in;
//            y[L+M-1] (Y_W bits each) out.
module linear_conv #(
  parameter int unsigned SAMPLE_W = lconv_pkg::SAMPLE_W,
  parameter int unsigned L        = lconv_pkg::SEQ_L,
  parameter int unsigned M        = lconv_pkg::SEQ_M,
  parameter int unsigned Y_W      = lconv_pkg::Y_W
) (
  input  logic [SAMPLE_W-1:0] x [L],
  input  logic [SAMPLE_W-1:0] h [M],
  output logic [Y_W-1:0]      y [L+M-1]
);

  localparam int unsigned P_W = 2 * SAMPLE_W;

  // prod[k][m] = x[k] * h[m]: the partial products of the convolution sum.
  logic [P_W-1:0] prod [L][M];

  for (genvar k = 0; k < L; k++) begin : g_x
    for (genvar m = 0; m < M; m++) begin : g_h
      csa_vedic_mult #(.N(SAMPLE_W)) u_mult (
        .a(x[k]),
        .b(h[m]),
        .p(prod[k][m])
      );
    end
  end

  conv_adder #(
    .L  (L),
    .M  (M),
    .P_W(P_W),
    .Y_W(Y_W)
  ) u_adder (
    .prod(prod),
    .y   (y)
  );

endmodule
