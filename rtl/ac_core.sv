// ac_core: one AC Core, the hardware accelerator for one Aho-Corasick FSM.
//
// Holds a search_engine (local memory with the FSM table, state-cell
// multiplexer, state register) and the core's control logic: it registers the
// location and protein number of each consumed symbol, passes the output match
// vector of the new state to the match_encoder, and concatenates each pattern
// ID with its location into a result word
//   res_data = { pattern ID, protein number, location }
// that is written to the global memory.
//
// Symbols arrive from the section's read address generator. in_step is high
// in a cycle where the symbol on in_char/in_loc/in_prot is consumed by every
// enabled core of the section; the generator only steps when all cores report
// ready. ready drops while the encoder still has IDs of an earlier symbol to
// send (a multi-pattern match, or a result that could not be written), which
// stalls the section. A disabled core (core_en low, the document's selective
// power-on) ignores symbols, reports ready and produces no results. idle is
// high when the core has no symbol in flight and nothing pending. clear
// returns the FSM to the root state at the start of a search.
//
// Latency: a match completed by the symbol consumed in cycle t is offered on
// the result port in cycle t+1. Throughput is one symbol per clock as long as
// each symbol completes at most one pattern. The split into engine, encoder
// and concatenation follows the document; the stream handshake is this
// design's own.
module ac_core #(
  parameter int unsigned ALPHA   = ac_pkg::ALPHABET,
  parameter int unsigned NPAT    = ac_pkg::PATTERNS,
  parameter int unsigned NSTATES = ac_pkg::STATES,
  parameter int unsigned CW      = ac_pkg::CHAR_W,
  parameter int unsigned LOC_W   = $clog2(ac_pkg::DB_DEPTH),
  parameter int unsigned PW      = ac_pkg::PROT_W,
  localparam int unsigned SW     = $clog2(NSTATES),
  localparam int unsigned ROW_W  = ALPHA * SW + NPAT,
  localparam int unsigned IDW    = (NPAT > 1) ? $clog2(NPAT) : 1,
  localparam int unsigned RES_W  = IDW + PW + LOC_W
) (
  input  logic             clk,
  input  logic             rst,
  // FSM table transfer
  input  logic [ROW_W-1:0] tbl_din,
  input  logic             tbl_we,
  input  logic             en_store,
  input  logic [SW-1:0]    tbl_addr,
  // control
  input  logic             core_en,
  input  logic             clear,
  // symbol stream
  input  logic             in_step,
  input  logic [CW-1:0]    in_char,
  input  logic [LOC_W-1:0] in_loc,
  input  logic [PW-1:0]    in_prot,
  output logic             ready,
  // results
  output logic             res_valid,
  output logic [RES_W-1:0] res_data,
  input  logic             res_ready,
  output logic             match_found,
  output logic             idle
);

  logic             step, step_q;
  logic [LOC_W-1:0] loc_q;
  logic [PW-1:0]    prot_q;
  logic [NPAT-1:0]  match_vec;
  logic [SW-1:0]    state;
  logic             hold, pending;
  logic [IDW-1:0]   id;
  logic [PW+LOC_W-1:0] tag;

  assign step = in_step && core_en;

  search_engine #(.ALPHA(ALPHA), .NPAT(NPAT), .NSTATES(NSTATES), .CW(CW)) u_engine (
    .clk, .rst,
    .tbl_din, .tbl_we, .en_store, .tbl_addr,
    .clear, .search_en(step), .in_char,
    .state, .match_vec, .match_found
  );

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      step_q <= 1'b0;
      loc_q  <= '0;
      prot_q <= '0;
    end else begin
      step_q <= step;
      if (step) begin
        loc_q  <= in_loc;
        prot_q <= in_prot;
      end
    end
  end

  match_encoder #(.NPAT(NPAT), .TAG_W(PW + LOC_W)) u_enc (
    .clk, .rst,
    .in_valid(step_q), .in_vec(match_vec), .in_tag({prot_q, loc_q}),
    .out_valid(res_valid), .out_id(id), .out_tag(tag), .out_ready(res_ready),
    .hold, .pending
  );

  // concatenation circuit: {pattern ID, pattern location}
  assign res_data = {id, tag};
  assign ready    = !hold;
  assign idle     = !step_q && !pending;

endmodule
