// search_engine: block-RAM implementation of an Aho-Corasick finite state
// machine, the Search Engine of the AC core.
//
// The FSM is held as a table in the local memory, one row per state. A row has
// one state-cell per alphabet symbol (the next state) and an output-cell, the
// output match vector, with one bit per pattern that ends in that state (row
// layout in ac_pkg). Searching one symbol is one table lookup: the row of the
// current state is read, the alpha-to-1 multiplexer picks the state-cell of the
// input symbol, and that value is loaded into the state register. Symbols
// outside the alphabet (code >= ALPHABET) load the root state 0.
//
// Configuration: the table is written one row per cycle while en_store is high;
// a row is written when en_store and tbl_we are both high, at tbl_addr. While
// en_store is high the memory address comes from tbl_addr, otherwise from the
// state path (as in the document's figure of the search engine).
//
// Timing: the local memory has a registered read port, as a block RAM has. To
// keep one symbol per clock the read address is the multiplexer output (the
// state the register is about to take), so the row of the current state is
// always ready at the memory output: a step taken in cycle t shows the match
// vector of the new state in cycle t+1. After en_store drops, or after clear,
// the row of the current state is valid one cycle later. clear returns the
// FSM to the root state and must be given before a search starts. The read
// port organisation and the clear input are choices of this design; the table
// format, the sizes and the datapath follow the document.
module search_engine #(
  parameter int unsigned ALPHA   = ac_pkg::ALPHABET,
  parameter int unsigned NPAT    = ac_pkg::PATTERNS,
  parameter int unsigned NSTATES = ac_pkg::STATES,
  parameter int unsigned CW      = ac_pkg::CHAR_W,
  localparam int unsigned SW     = $clog2(NSTATES),
  localparam int unsigned ROW_W  = ALPHA * SW + NPAT
) (
  input  logic             clk,
  input  logic             rst,
  // configuration (FSM table data in, local memory write en, en store memory,
  // local memory address)
  input  logic [ROW_W-1:0] tbl_din,
  input  logic             tbl_we,
  input  logic             en_store,
  input  logic [SW-1:0]    tbl_addr,
  // search
  input  logic             clear,      // return to the root state
  input  logic             search_en,  // consume in_char this cycle
  input  logic [CW-1:0]    in_char,
  output logic [SW-1:0]    state,
  output logic [NPAT-1:0]  match_vec,  // output match vector of 'state'
  output logic             match_found
);

  logic [ROW_W-1:0] mem [NSTATES];
  logic [ROW_W-1:0] row_q;
  logic [SW-1:0]    state_q, next_state, rd_addr;

  // alpha-to-1 multiplexer over the state-cells of the current row
  always_comb begin
    next_state = '0;
    for (int unsigned k = 0; k < ALPHA; k++) begin
      if (in_char == CW'(k))
        next_state = row_q[NPAT + (ALPHA - 1 - k) * SW +: SW];
    end
  end

  always_comb begin
    if (en_store)       rd_addr = tbl_addr;
    else if (clear)     rd_addr = '0;
    else if (search_en) rd_addr = next_state;
    else                rd_addr = state_q;
  end

  always_ff @(posedge clk) begin
    if (en_store && tbl_we)
      mem[tbl_addr] <= tbl_din;
    row_q <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (rst || clear)   state_q <= '0;
    else if (search_en) state_q <= next_state;
  end

  assign state       = state_q;
  assign match_vec   = row_q[NPAT-1:0];
  assign match_found = |match_vec;

endmodule
