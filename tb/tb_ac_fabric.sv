// tb_ac_fabric: two sections of two cores on two modelled database segments
// (registered read). Runs the document's four configurations:
//   1: one section enabled, on its own segment
//   2: shared = 1, both sections on segment 0 with different patterns
//   3: both sections with the same patterns on different segments
//   4: different patterns on different segments
// Every result { section, core, pattern ID, protein, location } must match
// the naive reference exactly once. Also checks lock step in shared mode
// (both sections present the same location), that stalls occur, and the
// search time of configuration 3 (two half-size segments) against one pass.
module tb_ac_fabric;
  import ac_tb_pkg::*;
  localparam int NS = 2, NC = 2, ALPHA = 26, NPAT = 4, NST = 32, CW = 5, LOC_W = 9, PW = 6;
  localparam int SW = $clog2(NST), ROW_W = ALPHA * SW + NPAT, IDW = 2, CRW = 1, SCW = 1;
  localparam int RES_W = SCW + CRW + IDW + PW + LOC_W;

  logic clk = 0, rst = 1;
  logic [ROW_W-1:0] tbl_din = 0;
  logic tbl_we = 0, start = 0, shared = 0;
  logic [SCW-1:0] tbl_sec = 0;
  logic [CRW-1:0] tbl_core = 0;
  logic [SW-1:0] tbl_addr = 0;
  logic [NS-1:0] section_en = '1, stalled;
  logic [NS*NC-1:0] core_en = '1;
  logic [LOC_W:0] db_size [NS];
  logic [LOC_W-1:0] seg_rd_addr [NS];
  logic [CW-1:0] seg_rd_data [NS];
  logic res_valid, res_ready = 1, active;
  logic [RES_W-1:0] res_data;
  logic [CW-1:0] seg [NS][512];
  int checks = 0, failures = 0, stall_cycles = 0, lockstep_bad = 0;
  int exp_cnt [logic [RES_W-1:0]];

  ac_fabric #(.NSEC(NS), .NCORES(NC), .ALPHA(ALPHA), .NPAT(NPAT), .NSTATES(NST), .CW(CW),
              .LOC_W(LOC_W), .PW(PW)) dut (.*);
  always #5 clk = ~clk;
  for (genvar s = 0; s < NS; s++) begin : g_m
    always_ff @(posedge clk) seg_rd_data[s] <= seg[s][seg_rd_addr[s]];
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (!rst && res_valid && res_ready) begin
    check(exp_cnt.exists(res_data) && exp_cnt[res_data] > 0, $sformatf("unexpected result %h", res_data));
    if (exp_cnt.exists(res_data)) begin
      exp_cnt[res_data]--;
      if (exp_cnt[res_data] == 0) exp_cnt.delete(res_data);
    end
  end
  always @(posedge clk) begin
    if (active && |stalled) stall_cycles++;
    if (active && shared && seg_rd_addr[0] != seg_rd_addr[1]) lockstep_bad++;
  end

  task automatic load(ac_table t, int s, int c);
    for (int st = 0; st < NST; st++) begin
      logic [2047:0] r;
      r = t.row(st);
      @(negedge clk);
      tbl_din = r[ROW_W-1:0]; tbl_addr = SW'(st); tbl_sec = SCW'(s); tbl_core = CRW'(c); tbl_we = 1;
    end
    @(negedge clk); tbl_we = 0;
  endtask

  // cfg: 1..4; returns search cycles
  task automatic run(int cfg, int len, int nsym, output int cycles);
    ac_table t;
    string ps[NS][NC][$];
    t = new(ALPHA, NPAT, NST);
    shared = (cfg == 2);
    section_en = (cfg == 1) ? 2'b01 : 2'b11;
    for (int s = 0; s < NS; s++) begin
      for (int i = 0; i < len; i++)
        seg[s][i] = ($urandom_range(25) == 0) ? CW'(31) : CW'($urandom_range(nsym - 1));
      db_size[s] = (LOC_W+1)'(len);
      for (int c = 0; c < NC; c++) begin
        if (cfg == 3 && s == 1) ps[s][c] = ps[0][c];
        else begin
          do begin
            ps[s][c] = {};
            for (int p = 0; p < NPAT; p++) ps[s][c].push_back(rand_pat($urandom_range(1, 3), 3));
            t.build(ps[s][c]);
          end while (t.overflow);
        end
        t.build(ps[s][c]);
        load(t, s, c);
      end
    end
    for (int s = 0; s < NS; s++) if (section_en[s]) begin
      int text[];
      int src;
      src = shared ? 0 : s;
      text = new[len];
      foreach (text[i]) text[i] = int'(seg[src][i]);
      for (int c = 0; c < NC; c++) begin
        longint unsigned hits[];
        int prot, off;
        naive_hits(ps[s][c], text, hits);
        prot = 0; off = 0;
        foreach (text[j]) begin
          for (int p = 0; p < NPAT; p++)
            if (hits[j][p]) begin
              logic [RES_W-1:0] k;
              k = {SCW'(s), CRW'(c), IDW'(p), PW'(prot), LOC_W'(off)};
              if (exp_cnt.exists(k)) exp_cnt[k]++; else exp_cnt[k] = 1;
            end
          if (text[j] == 31) begin prot++; off = 0; end
          else off++;
        end
      end
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (active) begin @(negedge clk); cycles++; if (cycles > 100000) break; end
    check(exp_cnt.size() == 0, $sformatf("config %0d: %0d results missing", cfg, exp_cnt.size()));
    exp_cnt.delete();
  endtask

  initial begin
    int c1, c3;
    repeat (2) @(posedge clk);
    rst = 0;
    run(1, 400, 3, c1);
    run(2, 400, 3, c1);
    run(4, 400, 3, c1);
    run(3, 400, 3, c3);
    // sparse matches: config 1 on 400 symbols against config 3 on two halves
    run(1, 400, 26, c1);
    run(3, 200, 26, c3);
    $display("config1 400 symbols: %0d cycles, config3 2x200: %0d cycles", c1, c3);
    check(c3 * 10 < c1 * 6, "configuration 3 on two halves takes well under the one-section time");
    check(stall_cycles > 0, "stall exercised");
    check(lockstep_bad == 0, "shared mode in lock step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
