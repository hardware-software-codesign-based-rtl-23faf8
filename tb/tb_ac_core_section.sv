// tb_ac_core_section: four AC cores, each with its own random pattern set,
// searching one symbol stream. The stream advances only when the section
// reports all_ready. Every result { core, pattern ID, protein, location } must
// match the naive reference of that core's patterns exactly once (compared as
// a multiset, since the merge interleaves cores). Checks that stalls happen,
// and that a disabled core produces no results.
module tb_ac_core_section;
  import ac_tb_pkg::*;
  localparam int NC = 4, ALPHA = 26, NPAT = 4, NST = 32, CW = 5, LOC_W = 10, PW = 6;
  localparam int SW = $clog2(NST), ROW_W = ALPHA * SW + NPAT, IDW = 2, CRW = 2;
  localparam int RES_W = CRW + IDW + PW + LOC_W;

  logic clk = 0, rst = 1;
  logic [ROW_W-1:0] tbl_din = 0;
  logic tbl_we = 0, clear = 0, in_step = 0;
  logic [CRW-1:0] tbl_core = 0;
  logic [SW-1:0] tbl_addr = 0;
  logic [NC-1:0] core_en = '1;
  logic [CW-1:0] in_char = 0;
  logic [LOC_W-1:0] in_loc = 0;
  logic [PW-1:0] in_prot = 0;
  logic all_ready, res_valid, res_ready = 1, idle;
  logic [RES_W-1:0] res_data;
  logic [NC-1:0] match_found;
  int checks = 0, failures = 0, stalls = 0, got = 0;
  int exp_cnt [logic [RES_W-1:0]];

  ac_core_section #(.NCORES(NC), .ALPHA(ALPHA), .NPAT(NPAT), .NSTATES(NST), .CW(CW),
                    .LOC_W(LOC_W), .PW(PW)) dut (.*);
  always #5 clk = ~clk;

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
    got++;
    check(exp_cnt.exists(res_data) && exp_cnt[res_data] > 0, $sformatf("unexpected result %h", res_data));
    if (exp_cnt.exists(res_data)) begin
      exp_cnt[res_data]--;
      if (exp_cnt[res_data] == 0) exp_cnt.delete(res_data);
    end
  end

  task automatic load(ac_table t, int c);
    for (int st = 0; st < NST; st++) begin
      logic [2047:0] r;
      r = t.row(st);
      @(negedge clk);
      tbl_din = r[ROW_W-1:0]; tbl_addr = SW'(st); tbl_core = CRW'(c); tbl_we = 1;
    end
    @(negedge clk); tbl_we = 0;
  endtask

  initial begin
    ac_table t;
    string ps[NC][$];
    int text[];
    longint unsigned hits[];
    t = new(ALPHA, NPAT, NST);
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 4; n++) begin
      int i, prot;
      core_en = (n == 3) ? 4'b1011 : 4'b1111;
      for (int c = 0; c < NC; c++) begin
        do begin
          ps[c] = {};
          for (int p = 0; p < NPAT; p++) ps[c].push_back(rand_pat($urandom_range(1, 3), 3));
          t.build(ps[c]);
        end while (t.overflow);
        load(t, c);
      end
      text = new[300];
      foreach (text[j]) text[j] = ($urandom_range(25) == 0) ? 31 : $urandom_range(2);
      for (int c = 0; c < NC; c++) if (core_en[c]) begin
        naive_hits(ps[c], text, hits);
        prot = 0;
        foreach (text[j]) begin
          for (int p = 0; p < NPAT; p++)
            if (hits[j][p]) begin
              logic [RES_W-1:0] k;
              k = {CRW'(c), IDW'(p), PW'(prot), LOC_W'(j)};
              if (exp_cnt.exists(k)) exp_cnt[k]++; else exp_cnt[k] = 1;
            end
          if (text[j] == 31) prot++;
        end
      end
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      i = 0; prot = 0;
      while (i < text.size()) begin
        res_ready = n[0] ? ($urandom_range(3) != 0) : 1'b1;
        in_char = CW'(text[i]); in_loc = LOC_W'(i); in_prot = PW'(prot);
        #1;
        in_step = all_ready;
        if (!all_ready) stalls++;
        @(negedge clk);
        if (in_step) begin if (text[i] == 31) prot++; i++; end
        in_step = 0;
      end
      res_ready = 1;
      repeat (NC * NPAT + 4) @(negedge clk);
      check(idle, "idle");
      check(exp_cnt.size() == 0, $sformatf("run %0d: %0d results missing", n, exp_cnt.size()));
      exp_cnt.delete();
    end
    check(stalls > 0, "stall exercised");
    check(got > 100, "results seen");
    $display("stalls=%0d results=%0d", stalls, got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
