// tb_master_ctrl: exercises the processor register map of the master control
// logic: register write/read-back, DB_SIZE registers, the start pulse and the
// busy/done sequencing against a modelled 'active' signal, the table row
// staging and commit decode (section, core, row, 292-bit row data), database
// write decode and blocking during a search, and global memory reads of both
// 32-bit halves of a result word.
module tb_master_ctrl;
  localparam int NS = 2, NC = 4, ROW_W = 292, SW = 10, CW = 5, LOC_W = 16, GM_DEPTH = 4096;
  localparam int WORDS = 10, GM_AW = 12;
  logic clk = 0, rst = 1;
  logic bus_we = 0, bus_re = 0;
  logic [23:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic bus_rvalid;
  logic start, shared, busy, done, active = 0;
  logic [NS-1:0] section_en;
  logic [NS*NC-1:0] core_en;
  logic [LOC_W:0] db_size [NS];
  logic [ROW_W-1:0] tbl_din;
  logic tbl_we, db_update, db_we;
  logic [0:0] tbl_sec, db_seg;
  logic [1:0] tbl_core;
  logic [SW-1:0] tbl_addr;
  logic [LOC_W-1:0] db_waddr;
  logic [CW-1:0] db_din;
  logic [GM_AW-1:0] gm_raddr;
  logic [63:0] gm_rdata;
  logic [GM_AW:0] gm_count = 13'd77;
  logic gm_overflow = 0;
  int checks = 0, failures = 0, starts = 0;

  master_ctrl #(.NSEC(NS), .NCORES(NC), .ROW_W(ROW_W), .SW(SW), .CW(CW), .LOC_W(LOC_W),
                .GM_DEPTH(GM_DEPTH)) dut (.*);
  always #5 clk = ~clk;
  // global memory model: word = {addr, ~addr} pattern, registered read
  always_ff @(posedge clk) gm_rdata <= {20'h0, gm_raddr, 20'hABCDE, gm_raddr};
  always @(posedge clk) if (start) starts++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); bus_we = 1; bus_addr = 24'(a); bus_wdata = d;
    @(negedge clk); bus_we = 0;
  endtask

  task automatic rd(int a, output logic [31:0] d);
    @(negedge clk); bus_re = 1; bus_addr = 24'(a);
    @(negedge clk); bus_re = 0;
    check(bus_rvalid, "rvalid one cycle after read");
    d = bus_rdata;
  endtask

  initial begin
    logic [31:0] d;
    logic [WORDS*32-1:0] row;
    repeat (2) @(posedge clk);
    rst = 0;
    wr(2, 32'h1); rd(2, d); check(d[1:0] == 2'b01 && section_en == 2'b01, "SECTION_EN");
    wr(3, 32'h5A); rd(3, d); check(d[7:0] == 8'h5A && core_en == 8'h5A, "CORE_EN");
    wr(8, 32'd1234); wr(9, 32'd65536); rd(8, d); check(d == 1234, "DB_SIZE0");
    rd(9, d); check(d == 65536 && db_size[1] == 17'd65536, "DB_SIZE1");
    wr(0, 32'h2); rd(0, d); check(d[1] && shared, "shared bit");
    rd(4, d); check(d == 77, "RESULTS");
    // table staging and commit
    for (int w = 0; w < WORDS; w++) begin
      row[w*32 +: 32] = $urandom;
      wr(16 + w, row[w*32 +: 32]);
    end
    @(negedge clk); bus_we = 1; bus_addr = 24'd6; bus_wdata = {16'd6, 16'd777};
    #1 check(tbl_we && tbl_sec == 1 && tbl_core == 2 && tbl_addr == 777, "commit decode");
    check(tbl_din == row[ROW_W-1:0], "staged row");
    @(negedge clk); bus_we = 0;
    #1 check(!tbl_we, "commit is one pulse");
    // database write
    @(negedge clk); bus_we = 1; bus_addr = 24'h400000 | (1 << LOC_W) | 24'd4321; bus_wdata = 32'd17;
    #1 check(db_we && db_update && db_seg == 1 && db_waddr == 4321 && db_din == 17, "db write decode");
    @(negedge clk); bus_we = 0;
    // start a search
    @(negedge clk); bus_we = 1; bus_addr = 24'd0; bus_wdata = 32'h3;
    #1 check(start && !db_update, "start pulse");
    @(negedge clk); bus_we = 0; active = 1;
    #1 check(busy && !done, "busy");
    // writes during the search are blocked
    @(negedge clk); bus_we = 1; bus_addr = 24'h400000; bus_wdata = 32'd1;
    #1 check(!db_we && !db_update, "db write blocked while busy");
    bus_addr = 24'd6;
    #1 check(!tbl_we, "commit blocked while busy");
    bus_addr = 24'd0; bus_wdata = 32'h1;
    #1 check(!start, "no restart while busy");
    @(negedge clk); bus_we = 0;
    repeat (5) @(negedge clk);
    active = 0;
    repeat (2) @(negedge clk);
    rd(1, d); check(d[0] && !d[1], "done after active falls");
    rd(5, d); check(d >= 7 && d <= 9, $sformatf("CYCLES %0d", d));
    check(starts == 1, "one start");
    // global memory reads
    rd(24'h800000 | (123 << 1), d); check(d == {20'hABCDE, 12'd123}, "gm low word");
    rd(24'h800000 | (123 << 1) | 1, d); check(d == {20'h0, 12'd123}, "gm high word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
