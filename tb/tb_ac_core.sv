// tb_ac_core: one AC core with an 8-pattern, 64-state table built by the
// software model. A symbol stream (with separators between proteins) is fed
// whenever the core is ready, with random bubbles and a randomly stalling
// result consumer. The result words { pattern ID, protein, location } must
// equal, in order, the naive reference matches (per symbol, lowest pattern
// first). With equal-length distinct patterns (at most one match per symbol)
// and a ready consumer the core must take exactly one symbol per clock. A
// disabled core must produce nothing and never stall.
module tb_ac_core;
  import ac_tb_pkg::*;
  localparam int ALPHA = 26, NPAT = 8, NST = 64, CW = 5, LOC_W = 10, PW = 6;
  localparam int SW = $clog2(NST), ROW_W = ALPHA * SW + NPAT, IDW = 3;
  localparam int RES_W = IDW + PW + LOC_W;

  logic clk = 0, rst = 1;
  logic [ROW_W-1:0] tbl_din = 0;
  logic tbl_we = 0, en_store = 0, core_en = 1, clear = 0, in_step = 0;
  logic [SW-1:0] tbl_addr = 0;
  logic [CW-1:0] in_char = 0;
  logic [LOC_W-1:0] in_loc = 0;
  logic [PW-1:0] in_prot = 0;
  logic ready, res_valid, res_ready = 1, match_found, idle;
  logic [RES_W-1:0] res_data;
  int checks = 0, failures = 0;
  logic [RES_W-1:0] exp_q[$];
  int got = 0;

  ac_core #(.ALPHA(ALPHA), .NPAT(NPAT), .NSTATES(NST), .CW(CW), .LOC_W(LOC_W), .PW(PW)) dut (.*);
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
    check(exp_q.size() > 0, "unexpected result");
    if (exp_q.size() > 0) begin
      check(res_data == exp_q[0], $sformatf("result %h exp %h", res_data, exp_q[0]));
      void'(exp_q.pop_front());
    end
  end

  task automatic load(ac_table t);
    for (int st = 0; st < NST; st++) begin
      logic [2047:0] r;
      r = t.row(st);
      @(negedge clk);
      tbl_din = r[ROW_W-1:0]; tbl_addr = SW'(st); en_store = 1; tbl_we = 1;
    end
    @(negedge clk); en_store = 0; tbl_we = 0;
  endtask

  // returns the number of cycles from first to last symbol consumed
  task automatic run(string pats[$], int text[], bit bubbles, bit rstall, bit expect_res, output int cycles);
    longint unsigned hits[];
    int prot, i;
    naive_hits(pats, text, hits);
    prot = 0;
    foreach (text[j]) begin
      if (expect_res)
        for (int p = 0; p < NPAT; p++)
          if (hits[j][p]) exp_q.push_back({IDW'(p), PW'(prot), LOC_W'(j)});
      if (text[j] == 31) prot++;
    end
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    i = 0; cycles = 0; prot = 0;
    while (i < text.size()) begin
      res_ready = rstall ? ($urandom_range(3) != 0) : 1'b1;
      in_char = CW'(text[i]); in_loc = LOC_W'(i); in_prot = PW'(prot);
      #1;
      in_step = ready && !(bubbles && $urandom_range(4) == 0);
      if (!core_en) check(ready, "disabled core is always ready");
      @(negedge clk);
      cycles++;
      if (in_step) begin
        if (text[i] == 31) prot++;
        i++;
      end
      in_step = 0;
    end
    res_ready = 1;
    repeat (NPAT + 4) @(negedge clk);
    check(idle, "idle after run");
    check(exp_q.size() == 0, $sformatf("%0d results missing", exp_q.size()));
    exp_q = {};
  endtask

  initial begin
    ac_table t;
    string ps[$];
    int text[];
    int cyc;
    t = new(ALPHA, NPAT, NST);
    repeat (2) @(posedge clk);
    rst = 0;
    // overlapping patterns, bubbles and result stalls
    for (int n = 0; n < 6; n++) begin
      ps = {};
      for (int p = 0; p < NPAT; p++) ps.push_back(rand_pat($urandom_range(1, 4), 3));
      t.build(ps);
      if (t.overflow) continue;
      load(t);
      text = new[400];
      foreach (text[i]) text[i] = ($urandom_range(30) == 0) ? 31 : $urandom_range(2);
      run(ps, text, n[0], n[1], 1, cyc);
    end
    // rate: distinct patterns of equal length, never two matches per symbol
    ps = {};
    while (ps.size() < NPAT) begin
      string s;
      bit dup;
      s = rand_pat(3, 3); dup = 0;
      foreach (ps[k]) if (ps[k] == s) dup = 1;
      if (!dup) ps.push_back(s);
    end
    t.build(ps);
    load(t);
    text = new[500];
    foreach (text[i]) text[i] = $urandom_range(2);
    run(ps, text, 0, 0, 1, cyc);
    check(cyc == 500, $sformatf("500 symbols took %0d cycles", cyc));
    check(got > 50, "matches seen");
    // disabled core
    core_en = 0;
    got = 0;
    run(ps, text, 0, 0, 0, cyc);
    check(got == 0, "disabled core produced results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
