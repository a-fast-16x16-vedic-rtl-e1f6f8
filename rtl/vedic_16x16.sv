// vedic_16x16: 16x16-bit unsigned multiplier, the top of this design: a Vedic
// (Urdhva Tiryakbhyam, "vertically and crosswise") multiplier whose partial
// products are summed by carry select adders instead of ripple carry adders.
//
// The operands are split into 8-bit halves AH:AL and BH:BL. Four 8x8 Vedic
// multipliers (each built the same way from 4x4 and, below that, 2x2 cells)
// form the vertical and crosswise products
//   pp_ll = AL*BL, pp_hl = AH*BL, pp_lh = AL*BH, pp_hh = AH*BH
// and the product is pp_ll + (pp_hl + pp_lh) << 8 + pp_hh << 16.
// The low 8 bits of pp_ll are final at once. The rest is summed by one 16-bit
// and two 24-bit carry select adders, as in the reference design:
//   sum_a = pp_ll[15:8] + pp_lh                       (16-bit adder)
//   sum_b = pp_hl + (pp_hh << 8)                       (24-bit adder)
//   sum_c = sum_a + sum_b                              (24-bit adder)
// and c = {sum_c, pp_ll[7:0]}. None of the three sums can exceed its adder
// width, so the carry-outs are always 0; an assertion checks that. Which
// partial product enters which adder is this implementation's own choice, as
// the reference schematic does not show those nets legibly; the adder count
// and widths follow the reference design.
//
// Interface: a, b (16 bits) -> c (32 bits), the three ports of the reference
// design's top level. Purely combinational: there is no clock, and the product is
// valid one combinational delay after the operands.
module vedic_16x16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] c
);

  localparam int unsigned H = 8;   // half width
  localparam int unsigned N = 2 * H; // operand width

  logic [N-1:0]   pp_ll, pp_hl, pp_lh, pp_hh; // half-size partial products
  logic [N-1:0]   sum_a;
  logic [3*H-1:0] sum_b, sum_c;
  logic [2:0]     adder_cout;                 // adder carry-outs, always 0

  vedic_8x8 u_mul_ll (.a(a[H-1:0]), .b(b[H-1:0]), .c(pp_ll));
  vedic_8x8 u_mul_hl (.a(a[N-1:H]), .b(b[H-1:0]), .c(pp_hl));
  vedic_8x8 u_mul_lh (.a(a[H-1:0]), .b(b[N-1:H]), .c(pp_lh));
  vedic_8x8 u_mul_hh (.a(a[N-1:H]), .b(b[N-1:H]), .c(pp_hh));

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
