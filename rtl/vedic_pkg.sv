// vedic_pkg: constants and helper functions shared by the Vedic multiplier
// and its carry select adders.
//
// csa_block_size() returns the width of one uniform carry select block for an
// n-bit adder. Uniform carry select adders reach their lowest delay when each
// block holds floor(sqrt(n)) full adders, because the ripple through one block
// then takes as long as the multiplexer chain that runs alongside it. The
// adders of this multiplier use that rule for their default block size.
package vedic_pkg;

  // floor(sqrt(n)) for n >= 1, evaluated at elaboration time.
  function automatic int unsigned csa_block_size(int unsigned n);
    int unsigned r;
    r = 1;
    while ((r + 1) * (r + 1) <= n) r++;
    return r;
  endfunction

endpackage
