// ac_core_section: an AC Core Section, N AC cores connected in parallel to one
// symbol stream (one database segment).
//
// Every core holds its own FSM table, so a section searches up to N*NPAT
// patterns in one pass over its segment. The section consumes a symbol only
// when every enabled core is ready (all_ready to the read address generator),
// so the cores stay in step. Cores are enabled one by one with core_en (the
// selective power-on of the document). The results of the N cores are merged
// round-robin into one stream; the core number is placed above each core's
// result word: res_data = { core, pattern ID, protein, location }.
// Table rows are written into core tbl_core with tbl_we (one row per pulse).
// idle is high when no core has a symbol in flight or a result pending.
// The parallel arrangement follows the document; the merge and the common
// stall are this design's choices.
module ac_core_section #(
  parameter int unsigned NCORES  = ac_pkg::CORES,
  parameter int unsigned ALPHA   = ac_pkg::ALPHABET,
  parameter int unsigned NPAT    = ac_pkg::PATTERNS,
  parameter int unsigned NSTATES = ac_pkg::STATES,
  parameter int unsigned CW      = ac_pkg::CHAR_W,
  parameter int unsigned LOC_W   = $clog2(ac_pkg::DB_DEPTH),
  parameter int unsigned PW      = ac_pkg::PROT_W,
  localparam int unsigned SW     = $clog2(NSTATES),
  localparam int unsigned ROW_W  = ALPHA * SW + NPAT,
  localparam int unsigned IDW    = (NPAT > 1) ? $clog2(NPAT) : 1,
  localparam int unsigned CRW    = (NCORES > 1) ? $clog2(NCORES) : 1,
  localparam int unsigned CRES_W = IDW + PW + LOC_W,
  localparam int unsigned RES_W  = CRW + CRES_W
) (
  input  logic              clk,
  input  logic              rst,
  // table transfer
  input  logic [ROW_W-1:0]  tbl_din,
  input  logic              tbl_we,
  input  logic [CRW-1:0]    tbl_core,
  input  logic [SW-1:0]     tbl_addr,
  // control
  input  logic [NCORES-1:0] core_en,
  input  logic              clear,
  // symbol stream
  input  logic              in_step,
  input  logic [CW-1:0]     in_char,
  input  logic [LOC_W-1:0]  in_loc,
  input  logic [PW-1:0]     in_prot,
  output logic              all_ready,
  // merged results
  output logic              res_valid,
  output logic [RES_W-1:0]  res_data,
  input  logic              res_ready,
  output logic [NCORES-1:0] match_found,
  output logic              idle
);

  logic [NCORES-1:0] ready, idle_c, rv, rr;
  logic [CRES_W-1:0] rd [NCORES];
  logic [CRES_W-1:0] m_data;
  logic [CRW-1:0]    m_idx;

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    logic sel;
    assign sel = tbl_we && (tbl_core == CRW'(c));
    ac_core #(.ALPHA(ALPHA), .NPAT(NPAT), .NSTATES(NSTATES), .CW(CW),
              .LOC_W(LOC_W), .PW(PW)) u_core (
      .clk, .rst,
      .tbl_din, .tbl_we(sel), .en_store(sel), .tbl_addr,
      .core_en(core_en[c]), .clear,
      .in_step, .in_char, .in_loc, .in_prot, .ready(ready[c]),
      .res_valid(rv[c]), .res_data(rd[c]), .res_ready(rr[c]),
      .match_found(match_found[c]), .idle(idle_c[c])
    );
  end

  rr_arbiter #(.N(NCORES), .DW(CRES_W)) u_merge (
    .clk, .rst,
    .in_valid(rv), .in_data(rd), .in_ready(rr),
    .out_valid(res_valid), .out_data(m_data), .out_idx(m_idx), .out_ready(res_ready)
  );

  assign res_data  = {m_idx, m_data};
  assign all_ready = &ready;
  assign idle      = &idle_c;

endmodule
