// Shared constants and types of the low-power bit-interchanging BIST.
//
// The scan length (and so the width of the LFSR, of the bit-interchanging
// network and of the scan-in register) defaults to the 8-bit arrangement the
// design is presented with. bi_num_cells() gives how many interchange cells the
// network holds for a given width: the bits are taken in groups of three from
// the most significant end, each group being one swappable pair plus one bit
// that is passed through unchanged and only used for the checks; a pair left
// over at the least significant end (width mod 3 == 2) borrows the pass-through
// bit above it. For 8 bits this gives three cells and leaves bits 5 and 2 alone.
// The controller state encoding is this design's own.
package bi_tpg_pkg;

  localparam int unsigned DEFAULT_SCAN_LEN = 8;

  // Number of 2-bit interchange cells for a pattern of n bits (n >= 3).
  function automatic int unsigned bi_num_cells(input int unsigned n);
    return (n / 3) + (((n % 3) == 2 && n >= 5) ? 1 : 0);
  endfunction

  // BIST sequencing states (test-per-scan: load, shift n bits, capture).
  typedef enum logic [2:0] {
    ST_IDLE    = 3'd0,
    ST_LOAD    = 3'd1,
    ST_SHIFT   = 3'd2,
    ST_CAPTURE = 3'd3,
    ST_UNLOAD  = 3'd4,
    ST_DONE    = 3'd5
  } bist_state_t;

endpackage
