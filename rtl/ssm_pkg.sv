// ssm_pkg: constants and helper functions shared by the systolic synchronous
// memory (SSM).
//
// The SSM is an N x N array of small SRAM blocks fed by a chain of row
// decoders down its left edge and a chain of column decoders along its top.
// The external address is split, from the most significant end, into
//   x   : log2(N) bits, array row of the target block
//   y   : log2(N) bits, array column of the target block
//   B   : upper part of the in-block row address (partially decoded)
//   A   : lower part of the in-block row address (partially decoded)
//   col : log2(COLS) bits, column inside the block (decoded to CSEL)
// This field order follows the 10-bit address of the 4 x 4 chip
// (x = [9:8], y = [7:6], B = [5:4], A = [3:2], col = [1:0]).
package ssm_pkg;

  // Defaults of the 4 Kb experimental chip: 4 x 4 blocks of 16 rows,
  // 4 columns and 4-bit words.
  localparam int unsigned DEF_N    = 4;
  localparam int unsigned DEF_ROWS = 16;
  localparam int unsigned DEF_COLS = 4;
  localparam int unsigned DEF_K    = 4;

  // Number of bits of a field that selects one of n things (at least 1).
  function automatic int unsigned bits_for(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

  // Width of the lower (A) and upper (B) partial row-address fields.
  function automatic int unsigned ra_a_bits(input int unsigned rows);
    return bits_for(rows) / 2;
  endfunction
  function automatic int unsigned ra_b_bits(input int unsigned rows);
    return bits_for(rows) - bits_for(rows) / 2;
  endfunction

  // External address width: 2*log2(N) + log2(ROWS) + log2(COLS).
  function automatic int unsigned addr_bits(input int unsigned n,
                                            input int unsigned rows,
                                            input int unsigned cols);
    return 2 * bits_for(n) + bits_for(rows) + bits_for(cols);
  endfunction

endpackage
