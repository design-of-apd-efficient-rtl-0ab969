// csla_pkg: group layout of the square-root carry-select adder (SQRT-CSLA).
//
// An N-bit SQRT-CSLA starts with a 2-bit ripple-carry adder on the least
// significant bits. Above it sit carry-select groups of growing width,
// 2, 3, 4, ..., each one bit wider than the one below, so that the carry
// arriving from below and the group's own carry words become ready at about
// the same time. The last group takes only the bits that remain. For N = 32
// this gives 2 (RCA) + 2+3+4+5+6+7+3, for N = 16 it gives 2 + 2+3+4+5. Both
// splits are the ones the design is defined with; for other N the same rule
// is applied (64: 2 + 2..10 + 8, 128: 2 + 2..15 + 7).
//
// The functions are constant functions used at elaboration time only.
package csla_pkg;

  // Width of the ripple-carry adder on the least significant bits.
  localparam int unsigned RCA_WIDTH = 2;
  // Width of the first carry-select group; each later group is one wider.
  localparam int unsigned FIRST_GROUP_WIDTH = 2;

  // Number of carry-select groups above the RCA for an n-bit adder.
  function automatic int unsigned num_groups(int unsigned n);
    int unsigned rem, w, g;
    rem = (n > RCA_WIDTH) ? n - RCA_WIDTH : 0;
    w   = FIRST_GROUP_WIDTH;
    g   = 0;
    while (rem > 0) begin
      rem = (rem > w) ? rem - w : 0;
      w   = w + 1;
      g   = g + 1;
    end
    return g;
  endfunction

  // Width of carry-select group idx (0 = the group just above the RCA).
  function automatic int unsigned group_width(int unsigned n, int unsigned idx);
    int unsigned rem, w, gw;
    rem = (n > RCA_WIDTH) ? n - RCA_WIDTH : 0;
    w   = FIRST_GROUP_WIDTH;
    gw  = 0;
    for (int unsigned g = 0; g <= idx; g++) begin
      gw  = (rem < w) ? rem : w;
      rem = rem - gw;
      w   = w + 1;
    end
    return gw;
  endfunction

  // Bit position of the least significant bit of carry-select group idx.
  function automatic int unsigned group_lsb(int unsigned n, int unsigned idx);
    int unsigned lsb;
    lsb = RCA_WIDTH;
    for (int unsigned g = 0; g < idx; g++) lsb = lsb + group_width(n, g);
    return lsb;
  endfunction

endpackage
