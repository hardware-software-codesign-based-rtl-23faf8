// ac_fabric: the Multi-AC Core Fabric, M AC core sections of N cores each,
// every section driven by its own read address generator (dragc).
//
// Segment routing selects between the document's configurations:
//  - shared = 0: section s reads database segment s with its own size
//    (configurations 3 and 4: one segment per section; the sections hold the
//    same FSMs in configuration 3 and different ones in configuration 4).
//  - shared = 1: every section reads segment 0 (configuration 2: all sections
//    on the same database, each core with a different FSM). The sections then
//    run in lock step: same start, same size, and a stall in any section
//    stalls all of them.
//  - configuration 1 is one enabled section (section_en) on its segment.
// The results of all sections are merged round-robin into one stream with the
// section number on top: res_data = { section, core, pattern ID, protein,
// location }. The read port of segment s is seg_rd_addr[s]/seg_rd_data[s]
// (registered read, data one cycle after the address). active is high while
// any section is searching or has results in flight. Table rows go to core
// tbl_core of section tbl_sec. The fabric and the four configurations follow
// the document; how they are selected in hardware is this design's choice.
module ac_fabric #(
  parameter int unsigned NSEC    = ac_pkg::SECTIONS,
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
  localparam int unsigned SCW    = (NSEC > 1) ? $clog2(NSEC) : 1,
  localparam int unsigned SRES_W = CRW + IDW + PW + LOC_W,
  localparam int unsigned RES_W  = SCW + SRES_W
) (
  input  logic                     clk,
  input  logic                     rst,
  // table transfer
  input  logic [ROW_W-1:0]         tbl_din,
  input  logic                     tbl_we,
  input  logic [SCW-1:0]           tbl_sec,
  input  logic [CRW-1:0]           tbl_core,
  input  logic [SW-1:0]            tbl_addr,
  // control
  input  logic                     start,
  input  logic                     shared,
  input  logic [NSEC-1:0]          section_en,
  input  logic [NSEC*NCORES-1:0]   core_en,
  input  logic [LOC_W:0]           db_size [NSEC],
  // database segment read ports
  output logic [LOC_W-1:0]         seg_rd_addr [NSEC],
  input  logic [CW-1:0]            seg_rd_data [NSEC],
  // results
  output logic                     res_valid,
  output logic [RES_W-1:0]         res_data,
  input  logic                     res_ready,
  output logic                     active,
  output logic [NSEC-1:0]          stalled   // section held a symbol this cycle
);

  logic [NSEC-1:0]   sec_ready, step, clear, busy, done, idle, rv, rr, run_ready;
  logic [SRES_W-1:0] rd [NSEC];
  logic [SRES_W-1:0] m_data;
  logic [SCW-1:0]    m_idx;
  logic              common_ready;

  assign common_ready = &sec_ready;

  for (genvar s = 0; s < NSEC; s++) begin : g_sec
    logic [CW-1:0]    sym;
    logic [LOC_W-1:0] loc;
    logic [PW-1:0]    prot;
    logic [LOC_W:0]   size;

    assign size         = shared ? db_size[0] : db_size[s];
    assign run_ready[s] = shared ? common_ready : sec_ready[s];

    dragc #(.CW(CW), .LOC_W(LOC_W), .PW(PW)) u_dragc (
      .clk, .rst,
      .start(start && section_en[s]), .db_size(size),
      .rd_addr(seg_rd_addr[s]), .rd_data(shared ? seg_rd_data[0] : seg_rd_data[s]),
      .all_ready(run_ready[s]), .step(step[s]), .clear(clear[s]),
      .sym, .loc, .prot, .busy(busy[s]), .done(done[s])
    );

    ac_core_section #(.NCORES(NCORES), .ALPHA(ALPHA), .NPAT(NPAT), .NSTATES(NSTATES),
                      .CW(CW), .LOC_W(LOC_W), .PW(PW)) u_section (
      .clk, .rst,
      .tbl_din, .tbl_we(tbl_we && (tbl_sec == SCW'(s))), .tbl_core, .tbl_addr,
      .core_en(core_en[s*NCORES +: NCORES]), .clear(clear[s]),
      .in_step(step[s]), .in_char(sym), .in_loc(loc), .in_prot(prot),
      .all_ready(sec_ready[s]),
      .res_valid(rv[s]), .res_data(rd[s]), .res_ready(rr[s]),
      .match_found(), .idle(idle[s])
    );

    assign stalled[s] = busy[s] && !run_ready[s];
  end

  rr_arbiter #(.N(NSEC), .DW(SRES_W)) u_merge (
    .clk, .rst,
    .in_valid(rv), .in_data(rd), .in_ready(rr),
    .out_valid(res_valid), .out_data(m_data), .out_idx(m_idx), .out_ready(res_ready)
  );

  assign res_data = {m_idx, m_data};
  assign active   = (|busy) || !(&idle);

endmodule
