// tb_search_engine: checks the block-RAM Aho-Corasick FSM on the document's
// worked example (patterns AC, DAC, ABD, ACED over a 26-letter alphabet) and
// on random pattern sets. The table is built by the software model, written
// row by row through the configuration port, and a text with separators is
// stepped through at one symbol per clock. After every step the output match
// vector must equal the set of patterns that a naive comparison finds ending
// at that symbol. Also checks the row width and state count of the example
// (10 states, 108-bit rows) and that configuration does not disturb a search.
module tb_search_engine;
  import ac_tb_pkg::*;

  localparam int ALPHA = 26, NPAT = 4, NST = 16, CW = 5;
  localparam int SW = $clog2(NST), ROW_W = ALPHA * SW + NPAT;

  logic clk = 0, rst = 1;
  logic [ROW_W-1:0] tbl_din;
  logic tbl_we = 0, en_store = 0, clear = 0, search_en = 0;
  logic [SW-1:0] tbl_addr;
  logic [CW-1:0] in_char;
  logic [SW-1:0] state;
  logic [NPAT-1:0] match_vec;
  logic match_found;
  int checks = 0, failures = 0;

  search_engine #(.ALPHA(ALPHA), .NPAT(NPAT), .NSTATES(NST), .CW(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic load(ac_table t);
    for (int st = 0; st < NST; st++) begin
      logic [2047:0] r;
      r = t.row(st);
      @(negedge clk);
      tbl_din = r[ROW_W-1:0]; tbl_addr = SW'(st); en_store = 1; tbl_we = 1;
    end
    @(negedge clk); en_store = 0; tbl_we = 0;
  endtask

  task automatic run(string pats[$], int text[]);
    longint unsigned hits[];
    naive_hits(pats, text, hits);
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    foreach (text[i]) begin
      in_char = CW'(text[i]); search_en = 1;
      @(negedge clk);
      // step taken at the previous edge: match vector of the new state
      check(match_vec == NPAT'(hits[i]), $sformatf("pos %0d sym %0d: vec %b exp %b", i, text[i], match_vec, NPAT'(hits[i])));
      check(match_found == (hits[i] != 0), "match_found");
    end
    search_en = 0;
  endtask

  initial begin
    string ex[$];
    ac_table t;
    int text[];
    ex = '{"AC", "DAC", "ABD", "ACED"};
    t = new(ALPHA, NPAT, NST);
    t.build(ex);
    check(t.nstates == 10, $sformatf("example FSM has %0d states, expected 10", t.nstates));
    check(ROW_W == 108, "example row width 108 bits");
    repeat (3) @(posedge clk);
    rst = 0;
    load(t);
    // text: DACEDABDACED|ACABD with separator code 31
    text = new[18];
    begin
      string s;
      s = "DACEDABDACEDACABDA";
      foreach (text[i]) text[i] = int'(s[i]) - 65;
      text[12] = 31;
    end
    run(ex, text);
    // the paper's example text must hit all four patterns
    // random texts over A..E on the example table
    for (int n = 0; n < 5; n++) begin
      text = new[200];
      foreach (text[i]) text[i] = ($urandom_range(30) == 0) ? 31 : $urandom_range(4);
      run(ex, text);
    end
    // random pattern sets
    for (int n = 0; n < 10; n++) begin
      string ps[$];
      ps = {};
      for (int p = 0; p < NPAT; p++) ps.push_back(rand_pat($urandom_range(1, 3), 3));
      t.build(ps);
      if (t.overflow) continue;
      load(t);
      text = new[300];
      foreach (text[i]) text[i] = ($urandom_range(40) == 0) ? 27 : $urandom_range(3);
      run(ps, text);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
