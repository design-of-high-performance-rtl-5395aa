// au_pkg: shared types and constants of the 16-bit Kogge-Stone arithmetic unit.
// The operand-select code {S1,S0} chooses what the operand multiplexers place
// on the adder's Q input; the encoding is the one of the unit's function table
// (00 -> B, 01 -> ~B, 10 -> all zeros, 11 -> all ones). AU_WIDTH is the data
// width of the published unit. The cell-count functions give the number of
// black and grey prefix cells a radix-2 Kogge-Stone tree of a given width holds
// (34 and 15 at 16 bits), so testbenches can check the generated structure.
package au_pkg;

  parameter int unsigned AU_WIDTH = 16;

  typedef enum logic [1:0] {
    QSEL_B    = 2'b00,  // Q = B
    QSEL_NOTB = 2'b01,  // Q = ~B
    QSEL_ZERO = 2'b10,  // Q = 0
    QSEL_ONES = 2'b11   // Q = all ones
  } qsel_e;

  // Number of prefix levels: ceil(log2(width)).
  function automatic int unsigned ks_levels(int unsigned width);
    return $clog2(width);
  endfunction

  // At level l (span d = 2**(l-1)) every bit i >= d holds a cell. It is grey
  // when its lower operand already reaches bit 0 (i < 2d), black otherwise.
  function automatic int unsigned ks_black_cells(int unsigned width);
    int unsigned n = 0;
    for (int unsigned d = 1; d < width; d = d * 2)
      if (width > 2 * d) n += width - 2 * d;
    return n;
  endfunction

  function automatic int unsigned ks_grey_cells(int unsigned width);
    int unsigned n = 0;
    for (int unsigned d = 1; d < width; d = d * 2)
      n += (width < 2 * d) ? width - d : d;
    return n;
  endfunction

endpackage
