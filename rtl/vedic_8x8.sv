// vedic_8x8: 8x8-bit unsigned multiplier, one level of the Vedic
// multiplier tree, built from four 4x4-bit Vedic multipliers and three
// carry select adders.
//
// Each operand is split into a high and a low half of 4 bits. The four
// half-size multipliers form the vertical and crosswise products
//   pp_ll = AL*BL, pp_hl = AH*BL, pp_lh = AL*BH, pp_hh = AH*BH
// and the product is pp_ll + (pp_hl + pp_lh) << 4 + pp_hh << 8.
// The low 4 bits of pp_ll are final at once. The rest is summed by
//   sum_a = pp_ll[8-1:4] + pp_lh                 (8-bit adder)
//   sum_b = pp_hl + (pp_hh << 4)                     (12-bit adder)
//   sum_c = sum_a + sum_b                              (12-bit adder)
// and the product is {sum_c, pp_ll[4-1:0]}. The adder widths (N, 3N/2,
// 3N/2) are those shown for the 16x16 level of the reference design, applied at every
// level; none of the three can overflow, so their carry-outs are always 0; an
// assertion checks that.
//
// Interface: a, b (8 bits) -> c (16 bits). Purely combinational.
module vedic_8x8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [15:0] c
);

  localparam int unsigned H = 4;   // half width
  localparam int unsigned N = 2 * H; // operand width

  logic [N-1:0]   pp_ll, pp_hl, pp_lh, pp_hh; // half-size partial products
  logic [N-1:0]   sum_a;
  logic [3*H-1:0] sum_b, sum_c;
  logic [2:0]     adder_cout;                 // adder carry-outs, always 0

  vedic_4x4 u_mul_ll (.a(a[H-1:0]), .b(b[H-1:0]), .c(pp_ll));
  vedic_4x4 u_mul_hl (.a(a[N-1:H]), .b(b[H-1:0]), .c(pp_hl));
  vedic_4x4 u_mul_lh (.a(a[H-1:0]), .b(b[N-1:H]), .c(pp_lh));
  vedic_4x4 u_mul_hh (.a(a[N-1:H]), .b(b[N-1:H]), .c(pp_hh));

  carry_select_adder #(.WIDTH(N)) u_add_a (
    .a   ({{H{1'b0}}, pp_ll[N-1:H]}),
    .b   (pp_lh),
    .cin (1'b0),
    .sum (sum_a),
    .cout(adder_cout[0])
  );

  carry_select_adder #(.WIDTH(3*H)) u_add_b (
    .a   ({{H{1'b0}}, pp_hl}),
    .b   ({pp_hh, {H{1'b0}}}),
    .cin (1'b0),
    .sum (sum_b),
    .cout(adder_cout[1])
  );

  carry_select_adder #(.WIDTH(3*H)) u_add_c (
    .a   ({{H{1'b0}}, sum_a}),
    .b   (sum_b),
    .cin (1'b0),
    .sum (sum_c),
    .cout(adder_cout[2])
  );

  assign c = {sum_c, pp_ll[H-1:0]};

  // The adder widths are chosen so that no partial sum can overflow.
  always_comb begin
    assert (adder_cout == 3'b000)
      else $error("partial-product adder overflow: a=%h b=%h", a, b);
  end

endmodule
