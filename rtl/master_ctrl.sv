// master_ctrl: Master Control Logic, the processor's interface to the
// accelerator.
//
// A simple word-addressed bus (bus_we / bus_re, 24-bit word address, 32-bit
// data, read data valid one cycle after bus_re) gives the processor access to:
//   addr[23:22] = 0  registers (addr[7:0]):
//     0x00 CTRL        W bit0: start a search (ignored while busy)
//                      RW bit1: shared (all sections read segment 0)
//     0x01 STATUS      R bit0 done, bit1 busy, bit2 result overflow
//     0x02 SECTION_EN  RW one bit per section
//     0x03 CORE_EN     RW one bit per core, core s*NCORES+c
//     0x04 RESULTS     R number of results in the global memory
//     0x05 CYCLES      R clock cycles taken by the last search
//     0x06 TBL_COMMIT  W data[31:16] core s*NCORES+c, data[15:0] row: writes
//                        the staged row into that core's local memory
//     0x08+s DB_SIZE   RW symbols in database segment s
//     0x10+w TBL_WORD  W word w of the staged table row (word 0 = bits 31:0)
//   addr[23:22] = 1  database write: addr[21:LOC_W] segment, addr[LOC_W-1:0]
//                    symbol index, data[CW-1:0] symbol
//   addr[23:22] = 2  global memory read: addr[GM_AW:1] result, addr[0] word
//                    (0 = bits 31:0, 1 = bits 63:32)
// Table rows and database contents can only be changed while no search runs.
// The table row number, database address and symbol, and result address are
// slices of the bus address and data, with no register in between.
// A search is finished (done) when the read address generators have finished
// and no core has a result in flight. The document names this block and its
// role (configuring the cores, starting the search, collecting results); the
// register map is this design's own, standing in for the AXI interface.
module master_ctrl #(
  parameter int unsigned NSEC     = ac_pkg::SECTIONS,
  parameter int unsigned NCORES   = ac_pkg::CORES,
  parameter int unsigned ROW_W    = ac_pkg::row_width(ac_pkg::ALPHABET, ac_pkg::STATES, ac_pkg::PATTERNS),
  parameter int unsigned SW       = $clog2(ac_pkg::STATES),
  parameter int unsigned CW       = ac_pkg::CHAR_W,
  parameter int unsigned LOC_W    = $clog2(ac_pkg::DB_DEPTH),
  parameter int unsigned GM_DEPTH = ac_pkg::GM_DEPTH,
  localparam int unsigned GM_AW   = $clog2(GM_DEPTH),
  localparam int unsigned WORDS   = (ROW_W + 31) / 32,
  localparam int unsigned CRW     = (NCORES > 1) ? $clog2(NCORES) : 1,
  localparam int unsigned SCW     = (NSEC > 1) ? $clog2(NSEC) : 1
) (
  input  logic                   clk,
  input  logic                   rst,
  // processor bus
  input  logic                   bus_we,
  input  logic                   bus_re,
  input  logic [23:0]            bus_addr,
  input  logic [31:0]            bus_wdata,
  output logic [31:0]            bus_rdata,
  output logic                   bus_rvalid,
  // search control
  output logic                   start,
  output logic                   shared,
  output logic [NSEC-1:0]        section_en,
  output logic [NSEC*NCORES-1:0] core_en,
  output logic [LOC_W:0]         db_size [NSEC],
  input  logic                   active,
  output logic                   busy,
  output logic                   done,
  // table transfer
  output logic [ROW_W-1:0]       tbl_din,
  output logic                   tbl_we,
  output logic [SCW-1:0]         tbl_sec,
  output logic [CRW-1:0]         tbl_core,
  output logic [SW-1:0]          tbl_addr,
  // database segments
  output logic                   db_update,
  output logic                   db_we,
  output logic [SCW-1:0]         db_seg,
  output logic [LOC_W-1:0]       db_waddr,
  output logic [CW-1:0]          db_din,
  // global memory
  output logic [GM_AW-1:0]       gm_raddr,
  input  logic [63:0]            gm_rdata,
  input  logic [GM_AW:0]         gm_count,
  input  logic                   gm_overflow
);

  logic [31:0]            stage_q [WORDS];
  logic                   shared_q, run_q, done_q;
  logic [NSEC-1:0]        sec_en_q;
  logic [NSEC*NCORES-1:0] core_en_q;
  logic [LOC_W:0]         size_q [NSEC];
  logic [31:0]            cycles_q;
  logic [1:0]             region;
  logic                   rd_gm_q, rd_word_q;
  logic [31:0]            reg_rd_q;
  logic [15:0]            commit_core;
  logic [WORDS*32-1:0]    stage_flat;

  assign region = bus_addr[23:22];

  assign start = bus_we && region == 2'd0 && bus_addr[7:0] == 8'h00 && bus_wdata[0] && !run_q;

  // table transfer: one row per TBL_COMMIT write
  assign commit_core = bus_wdata[31:16];
  assign tbl_we   = bus_we && region == 2'd0 && bus_addr[7:0] == 8'h06 && !run_q;
  assign tbl_sec  = SCW'(commit_core / 16'(NCORES));
  assign tbl_core = CRW'(commit_core % 16'(NCORES));
  assign tbl_addr = SW'(bus_wdata[15:0]);
  always_comb
    for (int w = 0; w < int'(WORDS); w++) stage_flat[w*32 +: 32] = stage_q[w];
  assign tbl_din  = stage_flat[ROW_W-1:0];

  // database load
  assign db_update = !run_q && !start;
  assign db_we     = bus_we && region == 2'd1 && !run_q;
  assign db_seg    = SCW'(bus_addr[21:LOC_W]);
  assign db_waddr  = bus_addr[LOC_W-1:0];
  assign db_din    = bus_wdata[CW-1:0];

  assign gm_raddr  = bus_addr[GM_AW:1];

  assign shared     = shared_q;
  assign section_en = sec_en_q;
  assign core_en    = core_en_q;
  assign db_size    = size_q;
  assign busy       = run_q;
  assign done       = done_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      shared_q  <= 1'b0;
      run_q     <= 1'b0;
      done_q    <= 1'b0;
      sec_en_q  <= '1;
      core_en_q <= '1;
      cycles_q  <= '0;
      for (int s = 0; s < int'(NSEC); s++) size_q[s] <= '0;
      for (int w = 0; w < int'(WORDS); w++) stage_q[w] <= '0;
    end else begin
      if (bus_we && region == 2'd0) begin
        case (bus_addr[7:0])
          8'h00: shared_q  <= bus_wdata[1];
          8'h02: sec_en_q  <= bus_wdata[NSEC-1:0];
          8'h03: core_en_q <= bus_wdata[NSEC*NCORES-1:0];
          default: ;
        endcase
        for (int s = 0; s < int'(NSEC); s++)
          if (bus_addr[7:0] == 8'(8 + s)) size_q[s] <= bus_wdata[LOC_W:0];
        if (bus_addr[7:4] == 4'h1 && int'(bus_addr[3:0]) < int'(WORDS))
          stage_q[bus_addr[3:0]] <= bus_wdata;
      end
      if (start) begin
        run_q    <= 1'b1;
        done_q   <= 1'b0;
        cycles_q <= '0;
      end else if (run_q) begin
        cycles_q <= cycles_q + 1'b1;
        if (!active) begin
          run_q  <= 1'b0;
          done_q <= 1'b1;
        end
      end
    end
  end

  // reads: registers and global memory, data one cycle after bus_re
  always_ff @(posedge clk) begin
    if (rst) begin
      bus_rvalid <= 1'b0;
      rd_gm_q    <= 1'b0;
      rd_word_q  <= 1'b0;
      reg_rd_q   <= '0;
    end else begin
      bus_rvalid <= bus_re;
      rd_gm_q    <= (region == 2'd2);
      rd_word_q  <= bus_addr[0];
      reg_rd_q   <= '0;
      case (bus_addr[7:0])
        8'h00: reg_rd_q <= {30'd0, shared_q, 1'b0};
        8'h01: reg_rd_q <= {29'd0, gm_overflow, run_q, done_q};
        8'h02: reg_rd_q <= 32'(sec_en_q);
        8'h03: reg_rd_q <= 32'(core_en_q);
        8'h04: reg_rd_q <= 32'(gm_count);
        8'h05: reg_rd_q <= cycles_q;
        default:
          for (int s = 0; s < int'(NSEC); s++)
            if (bus_addr[7:0] == 8'(8 + s)) reg_rd_q <= 32'(size_q[s]);
      endcase
    end
  end

  assign bus_rdata = rd_gm_q ? (rd_word_q ? gm_rdata[63:32] : gm_rdata[31:0]) : reg_rd_q;

endmodule
