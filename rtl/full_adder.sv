// full_adder: one-bit full adder, the cell from which the ripple carry adders
// of the carry select blocks are chained.
//
// sum = a ^ b ^ cin, cout = majority(a, b, cin). Purely combinational.
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
