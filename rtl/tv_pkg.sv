// tv_pkg - three-valued logic (0, 1, X) encoded on two wires per signal.
//
// The encoded don't-care option of the emulation environment replaces every
// wire of the circuits under test by a pair, so that flip-flops can start
// in an unknown state instead of an arbitrary 0/1 value. The encoding used
// here is dual-rail: bit 1 ("is1") says the signal may be taken as 1 and
// bit 0 ("is0") that it is 0; 2'b00 is X (unknown), 2'b01 is 0, 2'b10 is 1,
// and 2'b11 is unused. All gate functions are redefined on this encoding:
//   AND: is1 = a.is1 & b.is1, is0 = a.is0 | b.is0
//   OR : is1 = a.is1 | b.is1, is0 = a.is0 & b.is0
//   NOT: swap the two rails.
// With them X propagates pessimistically, and a controlling value (0 into
// AND, 1 into OR) still forces a known result. The encoding itself is this
// design's choice.
package tv_pkg;
  typedef logic [1:0] tv_t;

  localparam tv_t TV_X = 2'b00;
  localparam tv_t TV_0 = 2'b01;
  localparam tv_t TV_1 = 2'b10;

  function automatic tv_t tv_bit(input logic b);
    return b ? TV_1 : TV_0;
  endfunction

  function automatic tv_t tv_not(input tv_t a);
    return {a[0], a[1]};
  endfunction

  function automatic tv_t tv_and(input tv_t a, input tv_t b);
    return {a[1] & b[1], a[0] | b[0]};
  endfunction

  function automatic tv_t tv_or(input tv_t a, input tv_t b);
    return {a[1] | b[1], a[0] & b[0]};
  endfunction

  function automatic tv_t tv_nand(input tv_t a, input tv_t b);
    return tv_not(tv_and(a, b));
  endfunction

  function automatic tv_t tv_nor(input tv_t a, input tv_t b);
    return tv_not(tv_or(a, b));
  endfunction

  // Known and equal to 1 / 0.
  function automatic logic tv_known(input tv_t a);
    return a[1] ^ a[0];
  endfunction
endpackage
