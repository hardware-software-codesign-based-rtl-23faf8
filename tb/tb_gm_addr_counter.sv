// tb_gm_addr_counter: increments the global memory address counter with a
// random enable and compares address, count, write enable, full and overflow
// with a reference count; clears it in the middle of a run.
module tb_gm_addr_counter;
  localparam int DEPTH = 16;
  logic clk = 0, rst = 1, clear = 0, inc = 0;
  logic [3:0] addr;
  logic wr_en, full, overflow;
  logic [4:0] count;
  int checks = 0, failures = 0, ref_cnt = 0;
  bit ref_ovf = 0;

  gm_addr_counter #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      clear = (n == 100);
      inc = $urandom_range(1);
      #1;
      check(int'(count) == ref_cnt, $sformatf("count %0d exp %0d", count, ref_cnt));
      check(int'(addr) == ref_cnt % DEPTH, "addr");
      check(full == (ref_cnt == DEPTH), "full");
      check(overflow == ref_ovf, "overflow");
      check(wr_en == (inc && ref_cnt < DEPTH), "wr_en");
      @(posedge clk);
      if (clear) begin ref_cnt = 0; ref_ovf = 0; end
      else if (inc) begin
        if (ref_cnt == DEPTH) ref_ovf = 1; else ref_cnt++;
      end
    end
    check(ref_ovf, "overflow reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
