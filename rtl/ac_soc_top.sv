// ac_soc_top: reconfigurable Aho-Corasick string matching accelerator, the
// hardware side of a hardware/software codesign.
//
// Software builds an Aho-Corasick FSM for a set of patterns, turns it into a
// table (one row per state, see ac_pkg) and writes the rows into the local
// memories of the AC cores through the processor bus; no resynthesis is needed
// to change the patterns. The hardware then scans the database held in on-chip
// database segments at one symbol per clock and writes every match as
// { section, core, pattern ID, protein number, location } into the global
// memory, which the processor reads back.
//
// Structure: master_ctrl (processor interface and sequencing), NSEC database
// segments (database_memory), the ac_fabric of NSEC sections x NCORES AC cores
// with one read address generator per section, a gm_addr_counter and the
// global_memory. Default: 2 sections of 4 cores, 32 patterns per core of up to
// 30 symbols (960 FSM states), 26-symbol alphabet, as in the document's
// multi-core system. NSEC = NCORES = 1 gives the document's single-core system.
//
// Bus: word address bus_addr, 32-bit data, see master_ctrl for the map; read
// data arrive one cycle after bus_re. search_done mirrors the STATUS done bit,
// the flag raised for the processor when a search has completed.
module ac_soc_top #(
  parameter int unsigned NSEC     = ac_pkg::SECTIONS,
  parameter int unsigned NCORES   = ac_pkg::CORES,
  parameter int unsigned ALPHA    = ac_pkg::ALPHABET,
  parameter int unsigned NPAT     = ac_pkg::PATTERNS,
  parameter int unsigned NSTATES  = ac_pkg::STATES,
  parameter int unsigned CW       = ac_pkg::CHAR_W,
  parameter int unsigned DB_DEPTH = ac_pkg::DB_DEPTH,
  parameter int unsigned GM_DEPTH = ac_pkg::GM_DEPTH,
  parameter int unsigned PW       = ac_pkg::PROT_W
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        bus_we,
  input  logic        bus_re,
  input  logic [23:0] bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        bus_rvalid,
  output logic        search_done
);

  localparam int unsigned SW     = $clog2(NSTATES);
  localparam int unsigned ROW_W  = ALPHA * SW + NPAT;
  localparam int unsigned LOC_W  = $clog2(DB_DEPTH);
  localparam int unsigned GM_AW  = $clog2(GM_DEPTH);
  localparam int unsigned CRW    = (NCORES > 1) ? $clog2(NCORES) : 1;
  localparam int unsigned SCW    = (NSEC > 1) ? $clog2(NSEC) : 1;
  localparam int unsigned IDW    = (NPAT > 1) ? $clog2(NPAT) : 1;
  localparam int unsigned RES_W  = SCW + CRW + IDW + PW + LOC_W;

  // result word must fit the two 32-bit words read by the processor
  if (RES_W > 64) begin : g_res_too_wide
    $error("result word wider than 64 bits");
  end

  logic                   start, shared, busy, active;
  logic [NSEC-1:0]        section_en, stalled;
  logic [NSEC*NCORES-1:0] core_en;
  logic [LOC_W:0]         db_size [NSEC];
  logic [ROW_W-1:0]       tbl_din;
  logic                   tbl_we;
  logic [SCW-1:0]         tbl_sec, db_seg;
  logic [CRW-1:0]         tbl_core;
  logic [SW-1:0]          tbl_addr;
  logic                   db_update, db_we;
  logic [LOC_W-1:0]       db_waddr;
  logic [CW-1:0]          db_din;
  logic [LOC_W-1:0]       seg_rd_addr [NSEC];
  logic [CW-1:0]          seg_rd_data [NSEC];
  logic                   res_valid;
  logic [RES_W-1:0]       res_data;
  logic [GM_AW-1:0]       gm_raddr, gm_waddr;
  logic [63:0]            gm_rdata;
  logic [GM_AW:0]         gm_count;
  logic                   gm_we, gm_full, gm_overflow;

  master_ctrl #(.NSEC(NSEC), .NCORES(NCORES), .ROW_W(ROW_W), .SW(SW), .CW(CW),
                .LOC_W(LOC_W), .GM_DEPTH(GM_DEPTH)) u_master (
    .clk, .rst,
    .bus_we, .bus_re, .bus_addr, .bus_wdata, .bus_rdata, .bus_rvalid,
    .start, .shared, .section_en, .core_en, .db_size, .active, .busy,
    .done(search_done),
    .tbl_din, .tbl_we, .tbl_sec, .tbl_core, .tbl_addr,
    .db_update, .db_we, .db_seg, .db_waddr, .db_din,
    .gm_raddr, .gm_rdata, .gm_count, .gm_overflow
  );

  for (genvar s = 0; s < NSEC; s++) begin : g_seg
    database_memory #(.DEPTH(DB_DEPTH), .CW(CW)) u_dbseg (
      .clk,
      .db_update, .db_we(db_we && db_seg == SCW'(s)), .wr_addr(db_waddr), .din(db_din),
      .rd_addr(seg_rd_addr[s]), .dout(seg_rd_data[s])
    );
  end

  ac_fabric #(.NSEC(NSEC), .NCORES(NCORES), .ALPHA(ALPHA), .NPAT(NPAT),
              .NSTATES(NSTATES), .CW(CW), .LOC_W(LOC_W), .PW(PW)) u_fabric (
    .clk, .rst,
    .tbl_din, .tbl_we, .tbl_sec, .tbl_core, .tbl_addr,
    .start, .shared, .section_en, .core_en, .db_size,
    .seg_rd_addr, .seg_rd_data,
    .res_valid, .res_data, .res_ready(1'b1),
    .active, .stalled
  );

  gm_addr_counter #(.DEPTH(GM_DEPTH)) u_gm_cnt (
    .clk, .rst, .clear(start), .inc(res_valid),
    .addr(gm_waddr), .wr_en(gm_we), .count(gm_count), .full(gm_full),
    .overflow(gm_overflow)
  );

  global_memory #(.DEPTH(GM_DEPTH), .DW(64)) u_gm (
    .clk, .we(gm_we), .waddr(gm_waddr), .din(64'(res_data)),
    .raddr(gm_raddr), .rdata(gm_rdata)
  );

endmodule
