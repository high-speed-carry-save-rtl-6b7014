// vm_adder: vector merging adder of the carry save multiplier.
//
// A carry save array leaves its result as two vectors, a sum vector and a
// carry vector, that still have to be added once. This block does that final
// addition as a W-bit ripple carry adder built from full_adder cells: the
// carry of bit i feeds bit i+1 and cout is the carry out of the top bit.
// The adder structure (ripple carry) is this design's choice; the multiplier
// only requires that the two vectors be merged.
//
// Interface: a, b (W bits) and cin in; sum (W bits) and cout out.
// Timing: combinational, the delay grows with W through the carry chain.
module vm_adder #(
  parameter int unsigned W = lconv_pkg::SAMPLE_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  // c[i] is the carry into bit i, c[W] the carry out.
  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];

endmodule
