// csla_pkg: group layout of the square-root carry-select adder.
//
// A square-root CSLA splits a WIDTH-bit word into groups whose size grows
// by one bit per group, so that the ripple time inside a group roughly
// matches the time the select carry needs to reach it. The layout used here
// is 2, 2, 3, 4, 5, ... bits from the least significant end; the last group
// takes whatever bits remain. For 16 bits this gives 2-2-3-4-5, and for
// 128 bits sixteen groups 2-2-3-...-15-7. The growth rule is the usual one
// for square-root CSLAs; the exact sizes are this design's choice.
// All functions are constant functions, evaluated at elaboration.
package csla_pkg;

  // Size of group g when groups are not cut by the word width.
  function automatic int unsigned nominal_size(input int unsigned g);
    return (g == 0) ? 2 : g + 1;
  endfunction

  // Number of groups needed to cover width bits.
  function automatic int unsigned num_groups(input int unsigned width);
    int unsigned used = 0;
    int unsigned g = 0;
    while (used < width) begin
      used += nominal_size(g);
      g++;
    end
    return g;
  endfunction

  // Least significant bit position of group g.
  function automatic int unsigned group_lsb(input int unsigned width,
                                            input int unsigned g);
    int unsigned lsb = 0;
    for (int unsigned i = 0; i < g; i++) lsb += nominal_size(i);
    return (lsb > width) ? width : lsb;
  endfunction

  // Size of group g, the last one clipped to the word width.
  function automatic int unsigned group_size(input int unsigned width,
                                             input int unsigned g);
    int unsigned lsb = group_lsb(width, g);
    int unsigned n   = nominal_size(g);
    return (lsb + n > width) ? width - lsb : n;
  endfunction

endpackage
