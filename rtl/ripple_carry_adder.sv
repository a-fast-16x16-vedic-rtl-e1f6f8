// ripple_carry_adder: WIDTH-bit adder built as a chain of full adders, the
// carry of bit i feeding bit i+1.
//
// Interface: a, b (WIDTH bits), cin -> sum (WIDTH bits), cout. Purely
// combinational; the delay grows linearly with WIDTH. Two of these, one with
// carry-in 0 and one with carry-in 1, make up each carry select block. The
// default width of 4 is that of the carry select block drawn in the reference design.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[WIDTH];

endmodule
