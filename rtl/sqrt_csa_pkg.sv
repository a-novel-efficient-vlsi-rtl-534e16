// sqrt_csa_pkg: sizes of the 16-bit square-root carry select adder.
//
// The adder is cut into five groups whose widths grow from the least
// significant end (2, 2, 3, 4, 5 bits: bits 1:0, 3:2, 6:4, 10:7, 15:11) so
// that each group's Cin=0 sum and its excess-1 copy are ready by the time the
// carry from the group below arrives at its multiplexer. The group widths are
// the ones of the published 16-bit arrangement; group_lsb() gives the bit
// position where a group starts.
package sqrt_csa_pkg;

  localparam int unsigned WIDTH      = 16;
  localparam int unsigned NUM_GROUPS = 5;

  // Width of group g (0 = least significant group, bits 1:0).
  function automatic int unsigned group_width(input int unsigned g);
    case (g)
      0:       return 2;
      1:       return 2;
      2:       return 3;
      3:       return 4;
      default: return 5;
    endcase
  endfunction

  // Bit position of the least significant bit of group g.
  function automatic int unsigned group_lsb(input int unsigned g);
    int unsigned lsb;
    lsb = 0;
    for (int unsigned i = 0; i < g; i++) lsb += group_width(i);
    return lsb;
  endfunction

endpackage
