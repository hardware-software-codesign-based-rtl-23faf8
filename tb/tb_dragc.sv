// tb_dragc: runs the read address generator against a model of a
// registered-read database memory holding random symbols and separators,
// with a randomly stalling consumer. Symbols must be consumed from addresses
// 0..K-1 in order, each must be the memory word at its address, the protein
// number must equal the number of separators before it, the location must be
// the number of symbols since the last separator, and with no stalls a
// search of K symbols must finish (done) K+2 cycles after start.
module tb_dragc;
  localparam int CW = 5, LOC_W = 8, PW = 6, SEP = 31;
  logic clk = 0, rst = 1, start = 0, all_ready = 1;
  logic [LOC_W:0] db_size = 0;
  logic [LOC_W-1:0] rd_addr, loc;
  logic [CW-1:0] rd_data, sym;
  logic [PW-1:0] prot;
  logic step, clear, busy, done;
  logic [CW-1:0] mem [256];
  int checks = 0, failures = 0;

  dragc #(.CW(CW), .LOC_W(LOC_W), .PW(PW)) dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) rd_data <= mem[rd_addr];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run(int k, bit stalls);
    int next_loc, seps, off, cyc, stall_cnt;
    next_loc = 0; seps = 0; off = 0; cyc = 0; stall_cnt = 0;
    @(negedge clk);
    db_size = (LOC_W+1)'(k); start = 1;
    #1 check(clear, "clear with start");
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin
      all_ready = stalls ? ($urandom_range(3) != 0) : 1'b1;
      #1;
      if (step) begin
        check(int'(loc) == off % (1 << LOC_W), $sformatf("loc %0d exp %0d", loc, off));
        check(sym == mem[next_loc], "symbol");
        check(int'(prot) == seps % (1 << PW), "protein number");
        if (mem[next_loc] == CW'(SEP)) begin seps++; off = 0; end
        else off++;
        next_loc++;
      end else if (busy && !all_ready) stall_cnt++;
      @(negedge clk);
      cyc++;
      if (cyc > 10000) break;
    end
    check(next_loc == k, $sformatf("consumed %0d of %0d", next_loc, k));
    if (!stalls) check(cyc == k + 2, $sformatf("done after %0d cycles, exp %0d", cyc, k + 2));
    else check(stall_cnt > 0 || k == 0, "stall exercised");
    check(!busy, "idle after done");
  endtask

  initial begin
    foreach (mem[i]) mem[i] = ($urandom_range(9) == 0) ? CW'(SEP) : CW'($urandom_range(25));
    repeat (2) @(posedge clk);
    rst = 0;
    run(256, 0);
    run(1, 0);
    run(0, 0);
    run(100, 1);
    run(256, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
