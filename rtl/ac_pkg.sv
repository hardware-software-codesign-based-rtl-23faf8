// ac_pkg: shared constants, types and helper functions of the Aho-Corasick
// string matching accelerator.
//
// Character coding: every database symbol is CHAR_W bits. Codes 0 .. ALPHABET-1
// are the residues of the search alphabet (A..Z for the 26-symbol alphabet).
// Any code at or above ALPHABET is not part of the FSM alphabet and sends the
// automaton back to its root state; the all-ones code SEP_CODE additionally
// marks the boundary between two proteins of a FASTA database and advances the
// protein counter. The 26-symbol alphabet, 32 patterns per core and the
// 2 x 4 multi-core arrangement follow the document; the separator coding is a
// choice of this design.
//
// FSM table row layout (one row per FSM state), MSB first:
//   { cell[0], cell[1], ..., cell[ALPHABET-1], match[PATTERNS-1:0] }
// cell[k] is the next state for symbol k (leftmost column = symbol A) and match
// is the output-cell: bit p set means pattern p ends in this state.
package ac_pkg;

  // Defaults of the main configuration.
  localparam int unsigned ALPHABET  = 26;    // alpha, symbols in the FSM alphabet
  localparam int unsigned PATTERNS  = 32;    // omega, patterns per AC core
  localparam int unsigned MAX_LEN   = 30;    // L, longest pattern the table is sized for
  localparam int unsigned STATES    = PATTERNS * MAX_LEN;  // S*L rows of local memory
  localparam int unsigned CHAR_W    = 5;     // bits per database symbol
  localparam int unsigned SEP_CODE  = (1 << CHAR_W) - 1;   // protein separator
  localparam int unsigned SECTIONS  = 2;     // M
  localparam int unsigned CORES     = 4;     // N, cores per section
  localparam int unsigned DB_DEPTH  = 65536; // symbols per database segment
  localparam int unsigned GM_DEPTH  = 4096;  // result entries in global memory
  localparam int unsigned PROT_W    = 16;    // protein counter width
  localparam int unsigned BUS_W     = 32;    // processor data word

  // Width of a table row for a given geometry.
  function automatic int unsigned row_width(int unsigned alpha, int unsigned nstates,
                                            int unsigned npat);
    return alpha * $clog2(nstates) + npat;
  endfunction

  // Number of 32-bit bus words needed to transfer one row.
  function automatic int unsigned row_words(int unsigned alpha, int unsigned nstates,
                                            int unsigned npat);
    return (row_width(alpha, nstates, npat) + BUS_W - 1) / BUS_W;
  endfunction

endpackage
