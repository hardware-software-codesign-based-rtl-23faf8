// tb_single_core: end-to-end test of the accelerator through its processor bus,
// configured as the single-core system (one section of one core, 32
// patterns, 960-state table, 4 Ki-symbol database).
//
// The testbench plays the processor software: for every core it generates a
// random peptide-like pattern set, builds the Aho-Corasick table with the
// software model, transfers it row by row (staging words + commit), writes
// random protein sequences with separators into the database segments
// (planting pattern occurrences so that matches are frequent), starts the
// search, waits for done and reads every result back from the global memory.
// Results are compared, as a multiset, with a naive search of each core's
// patterns in the segment that core's section reads. Counted mechanisms:
// reconfiguration with new patterns, multi-pattern matches and protein
// separators.
module tb_single_core;
  import ac_tb_pkg::*;
  localparam int NS = 1, NC = 1, ALPHA = 26, NPAT = 32, NST = 960, CW = 5;
  localparam int DB_DEPTH = 4096, GM_DEPTH = 4096, PW = 16, PLANT = 20;
  localparam int SW = $clog2(NST), ROW_W = ALPHA * SW + NPAT, WORDS = (ROW_W + 31) / 32;
  localparam int LOC_W = $clog2(DB_DEPTH), IDW = $clog2(NPAT);
  localparam int CRW = (NC > 1) ? $clog2(NC) : 1, SCW = (NS > 1) ? $clog2(NS) : 1;
  localparam int RES_W = SCW + CRW + IDW + PW + LOC_W;

  logic clk = 0, rst = 1;
  logic bus_we = 0, bus_re = 0;
  logic [23:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic bus_rvalid, search_done;
  int checks = 0, failures = 0;
  int n_stall = 0, n_multi = 0, n_overflow = 0, n_disabled = 0, n_reconfig = 0;
  int n_cfg[5] = '{0, 0, 0, 0, 0};
  int n_sep = 0, n_results = 0;
  int exp_cnt [logic [RES_W-1:0]];
  string pats [NS][NC][$];
  int seg [NS][];

  ac_soc_top #(.NSEC(NS), .NCORES(NC), .DB_DEPTH(DB_DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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
    @(negedge clk); bus_re = 0; d = bus_rdata;
  endtask

  // software side: build and transfer the table of one core
  task automatic load_core(int s, int c);
    ac_table t;
    logic [WORDS*32-1:0] w;
    t = new(ALPHA, NPAT, NST);
    t.build(pats[s][c]);
    check(!t.overflow, "pattern set fits the local memory");
    for (int st = 0; st < t.nstates; st++) begin
      logic [2047:0] r;
      r = t.row(st);
      w = r[WORDS*32-1:0];
      for (int k = 0; k < WORDS; k++) wr(16 + k, w[k*32 +: 32]);
      wr(6, {16'(s * NC + c), 16'(st)});
    end
  endtask

  task automatic new_patterns(int s, int c, int maxlen);
    pats[s][c] = {};
    for (int p = 0; p < NPAT; p++) pats[s][c].push_back(rand_pat($urandom_range(2, maxlen), 20));
  endtask

  task automatic new_segment(int s, int len);
    seg[s] = new[len];
    foreach (seg[s][i]) seg[s][i] = ($urandom_range(150) == 0) ? 31 : $urandom_range(19);
    // plant occurrences of the section's patterns
    for (int k = 0; k < len / PLANT; k++) begin
      string p;
      int at;
      p = pats[s][$urandom_range(NC - 1)][$urandom_range(NPAT - 1)];
      at = $urandom_range(len - 1);
      for (int j = 0; j < p.len() && at + j < len; j++) seg[s][at + j] = int'(p[j]) - 65;
    end
    for (int i = 0; i < len; i++) wr(32'h400000 | (s << LOC_W) | i, 32'(seg[s][i]));
    wr(8 + s, 32'(len));
  endtask

  // cfg 1..4; returns number of expected results
  task automatic search(int cfg, logic [NS*NC-1:0] cen, output int nexp, output int ncyc);
    logic [31:0] d, lo, hi;
    int cnt, sec_en;
    bit shared;
    shared = (cfg == 2);
    sec_en = (cfg == 1) ? 1 : (1 << NS) - 1;
    nexp = 0;
    for (int s = 0; s < NS; s++) if (sec_en[s]) begin
      int src;
      src = shared ? 0 : s;
      for (int c = 0; c < NC; c++) if (cen[s*NC + c]) begin
        longint unsigned hits[];
        int prot, off;
        naive_hits(pats[s][c], seg[src], hits);
        prot = 0; off = 0;
        foreach (seg[src][j]) begin
          if ($countones(hits[j]) > 1) n_multi++;
          for (int p = 0; p < NPAT; p++)
            if (hits[j][p]) begin
              logic [RES_W-1:0] k;
              k = {SCW'(s), CRW'(c), IDW'(p), PW'(prot), LOC_W'(off)};
              if (exp_cnt.exists(k)) exp_cnt[k]++; else exp_cnt[k] = 1;
              nexp++;
            end
          if (seg[src][j] == 31) begin prot++; off = 0; n_sep++; end
          else off++;
        end
      end
    end
    wr(2, 32'(sec_en));
    wr(3, 32'(cen));
    wr(0, (32'(shared) << 1));
    wr(0, (32'(shared) << 1) | 32'h1);
    do rd(1, d); while (!d[0]);
    check(search_done, "search_done output");
    rd(5, d); ncyc = int'(d);
    // a search without stalls takes its length plus a few cycles of latency
    if (ncyc > seg[0].size() + 8) n_stall++;
    rd(4, d); cnt = int'(d);
    n_results += cnt;
    rd(1, d);
    if (nexp > GM_DEPTH) begin
      check(cnt == GM_DEPTH && d[2], "global memory full and overflow flagged");
      n_overflow++;
    end else begin
      check(cnt == nexp && !d[2], $sformatf("cfg %0d: %0d results, expected %0d", cfg, cnt, nexp));
    end
    for (int i = 0; i < cnt; i++) begin
      logic [63:0] r;
      logic [RES_W-1:0] k;
      rd(32'h800000 | (i << 1), lo);
      rd(32'h800000 | (i << 1) | 1, hi);
      r = {hi, lo};
      k = r[RES_W-1:0];
      check(exp_cnt.exists(k) && exp_cnt[k] > 0, $sformatf("unexpected result %h", k));
      if (exp_cnt.exists(k)) begin
        exp_cnt[k]--;
        if (exp_cnt[k] == 0) exp_cnt.delete(k);
      end
    end
    if (nexp <= GM_DEPTH) check(exp_cnt.size() == 0, "all results found");
    exp_cnt.delete();
    if (cen != '1) n_disabled++;
    n_cfg[cfg]++;
  endtask

  initial begin
    int nexp, ncyc, len;
    int total;
    int plen[3];
    total = 0;
    plen = '{4, 8, 16};
    repeat (3) @(posedge clk);
    rst = 0;
    // single-core system: one core, 32 patterns, reconfigured twice
    len = 2000;
    for (int r = 0; r < 3; r++) begin
      new_patterns(0, 0, 12 + 8 * r);
      // pattern 1 is a suffix of pattern 0: both end on the same symbol
      pats[0][0][1] = pats[0][0][0].substr(pats[0][0][0].len() - 2, pats[0][0][0].len() - 1);
      load_core(0, 0);
      n_reconfig++;
      new_segment(0, len);
      search(1, '1, nexp, ncyc);
      check(ncyc >= len, "at most one symbol per clock");
    end
    $display("mechanisms: stall=%0d multi=%0d overflow=%0d disabled=%0d reconfig=%0d sep=%0d cfg1..4=%0d/%0d/%0d/%0d results=%0d",
             n_stall, n_multi, n_overflow, n_disabled, n_reconfig, n_sep, n_cfg[1], n_cfg[2], n_cfg[3], n_cfg[4], n_results);
    check(n_reconfig > 1, "reconfiguration happened");
    check(n_sep > 0, "protein separator happened");
    check(n_multi > 0, "multi-pattern match happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
