// vedic_2x2: 2x2-bit unsigned multiplier by the Urdhva Tiryakbhyam
// ("vertically and crosswise") rule, the leaf of the Vedic multiplier tree.
//
// q[0] is the vertical product a[0]&b[0]. The two crosswise products
// a[1]&b[0] and a[0]&b[1] go through a half adder: its sum is q[1]. The
// vertical product of the upper bits, a[1]&b[1], goes through a second half
// adder with that carry: its sum is q[2] and its carry q[3]. Four AND gates and
// two half adders in all, as the reference design describes.
//
// Interface: a, b (2 bits) -> q (4 bits). Purely combinational: the reference
// design also shows a stand-alone version of this cell with a clocked output
// register, but the 16x16 multiplier built from it has no clock, so this cell
// has none either.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);

  logic cross_hi, cross_lo; // crosswise products a1*b0 and a0*b1
  logic vert_hi;            // vertical product of the upper bits a1*b1
  logic carry1;             // carry of the crosswise half adder

  always_comb begin
    cross_hi = a[1] & b[0];
    cross_lo = a[0] & b[1];
    vert_hi  = a[1] & b[1];
    carry1   = cross_hi & cross_lo;

    q[0] = a[0] & b[0];
    q[1] = cross_hi ^ cross_lo;
    q[2] = vert_hi ^ carry1;
    q[3] = vert_hi & carry1;
  end

endmodule
