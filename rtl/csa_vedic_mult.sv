// csa_vedic_mult: N x N unsigned carry save multiplier organised by the
// vertical and crosswise (Urdhva-Tiryagbhyam) rule.
//
// Vertical and crosswise multiplication forms product digit k from all cross
// products a[i]*b[k-i] whose weights add up to k, plus the carry left over
// from digit k-1. In binary those cross products are the AND terms
// pp[j][i] = a[i] & b[j] with i + j = k, and this block adds them in a carry
// save array:
//   * row 0 holds the partial product row pp[0] (a & b[0]);
//   * row j (1..N-1) is a line of N full adders; the adder of column i+j adds
//     pp[j][i], the sum bit that row j-1 left in the same column, and the
//     carry that row j-1 produced one column lower. Carries therefore travel
//     diagonally down the array and are never rippled inside a row;
//   * the lowest column of each row is final and gives product bit j;
//   * the sum and carry vectors left below row N-1 cover columns N..2N-1 and
//     are added once by the vector merging adder (vm_adder).
// The carry save array with diagonal carries and a vector merging adder is
// the structure the design is built on; the exact cell arrangement (full
// adders with zero inputs where a half adder would do, ripple merge) is this
// implementation's choice.
//
// Interface: a, b (N bits, unsigned) in; p (2N bits) = a * b out.
// Timing: combinational; the path runs through N-1 array rows and the N-bit
// ripple merge.
module csa_vedic_mult #(
  parameter int unsigned N = lconv_pkg::SAMPLE_W
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  // Row j keeps its own sum and carry vectors: g_row[j].s[i] is the sum out of
  // column i+j and g_row[j].c[i] the carry out of it, of weight i+j+1.
  for (genvar j = 0; j < N; j++) begin : g_row
    logic [N-1:0] s;
    logic [N-1:0] c;

    if (j == 0) begin : g_first
      // Row 0: the first partial product row, no carries yet.
      assign s = a & {N{b[0]}};
      assign c = '0;
    end else begin : g_add
      for (genvar i = 0; i < N; i++) begin : g_col
        // Sum bit of the row above that sits in column i+j; the top column
        // of a row has none.
        logic s_in;
        if (i + 1 < N) begin : g_s
          assign s_in = g_row[j-1].s[i+1];
        end else begin : g_nos
          assign s_in = 1'b0;
        end

        full_adder u_fa (
          .a   (a[i] & b[j]),
          .b   (s_in),
          .cin (g_row[j-1].c[i]),
          .sum (s[i]),
          .cout(c[i])
        );
      end
    end

    // Lower half of the product: the lowest column of every row is final.
    assign p[j] = s[0];
  end

  // Upper half: merge the remaining sum bits (columns N..2N-2) with the last
  // row's carries (columns N..2N-1).
  logic [N-1:0] merge_a;
  logic         merge_cout;

  assign merge_a = {1'b0, g_row[N-1].s[N-1:1]};

  vm_adder #(.W(N)) u_merge (
    .a   (merge_a),
    .b   (g_row[N-1].c),
    .cin (1'b0),
    .sum (p[2*N-1:N]),
    .cout(merge_cout)
  );

  // An N x N product always fits in 2N bits, so the merge never carries out.
  always_comb begin
    assert (merge_cout == 1'b0)
      else $error("csa_vedic_mult: vector merge carried out of 2N bits");
  end

  initial begin
    assert (N >= 2) else $fatal(1, "csa_vedic_mult: N must be at least 2");
  end

endmodule
