// full_adder: one-bit full adder, the cell of the carry save array and of the
// vector merging adder.
//
// Interface: a, b, cin in; sum = a ^ b ^ cin and cout = majority(a, b, cin)
// out. Purely combinational, no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end

endmodule
