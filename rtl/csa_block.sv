// csa_block: one carry select stage.
//
// The block adds a and b twice in parallel, with two ripple carry adders: one
// assumes a carry-in of 0, the other a carry-in of 1. When the real carry-in
// arrives, a row of 2:1 multiplexers picks the matching sum, and one more
// multiplexer picks the matching carry-out. The carry therefore crosses the
// block through a single multiplexer instead of WIDTH full adders.
//
// Interface: a, b (WIDTH bits), cin -> sum (WIDTH bits), cout. Purely
// combinational. The default width of 4 is that of the block drawn in the
// reference design, and so is the structure: two ripple chains and the
// output multiplexers.
module csa_block #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH-1:0] sum0, sum1;   // sums for carry-in 0 and carry-in 1
  logic             cout0, cout1; // carry-outs for carry-in 0 and carry-in 1

  ripple_carry_adder #(.WIDTH(WIDTH)) u_rca0 (
    .a(a), .b(b), .cin(1'b0), .sum(sum0), .cout(cout0)
  );

  ripple_carry_adder #(.WIDTH(WIDTH)) u_rca1 (
    .a(a), .b(b), .cin(1'b1), .sum(sum1), .cout(cout1)
  );

  always_comb begin
    sum  = cin ? sum1  : sum0;
    cout = cin ? cout1 : cout0;
  end

endmodule
