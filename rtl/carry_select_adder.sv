// carry_select_adder: WIDTH-bit adder made of a chain of carry select blocks.
//
// The operands are cut into blocks of BLOCK bits, least significant first; the
// last block takes whatever is left when BLOCK does not divide WIDTH. Every
// block computes both possible results at once (see csa_block), so the carry
// only has to pass one multiplexer per block. The default BLOCK is
// floor(sqrt(WIDTH)), the uniform block size that balances the ripple delay
// inside a block against the multiplexer chain between blocks.
//
// Interface: a, b (WIDTH bits), cin -> sum (WIDTH bits), cout. Purely
// combinational. The block-carry vector `carry` (carry[k] enters block k) is
// kept as a named signal so that a simulation can observe which blocks took
// their carry-in-1 result.
//
// The first block is a carry select block too, although its carry-in is known
// early. The reference design does not say otherwise, and synthesis removes
// the half that a constant carry-in leaves unused.
module carry_select_adder
  import vedic_pkg::*;
#(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned BLOCK = csa_block_size(WIDTH)
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NBLK = (WIDTH + BLOCK - 1) / BLOCK;

  logic [NBLK:0] carry;

  assign carry[0] = cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    localparam int unsigned LO = k * BLOCK;
    localparam int unsigned W  = (LO + BLOCK <= WIDTH) ? BLOCK : WIDTH - LO;

    csa_block #(.WIDTH(W)) u_blk (
      .a   (a[LO +: W]),
      .b   (b[LO +: W]),
      .cin (carry[k]),
      .sum (sum[LO +: W]),
      .cout(carry[k+1])
    );
  end

  assign cout = carry[NBLK];

endmodule
