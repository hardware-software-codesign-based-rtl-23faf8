// tb_database_memory: loads random symbols in update mode, checks that reads
// in search mode return them one cycle after the address, and that writes are
// ignored when the update signal is low.
module tb_database_memory;
  localparam int DEPTH = 256, CW = 5;
  logic clk = 0, db_update = 1, db_we = 0;
  logic [7:0] wr_addr = 0, rd_addr = 0;
  logic [CW-1:0] din = 0, dout;
  logic [CW-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  database_memory #(.DEPTH(DEPTH), .CW(CW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      db_update = 1; db_we = 1; wr_addr = 8'(i); din = CW'($urandom); model[i] = din;
    end
    @(negedge clk);
    db_we = 0; db_update = 0;
    for (int n = 0; n < 500; n++) begin
      int a;
      @(negedge clk);
      rd_addr = 8'($urandom); a = int'(rd_addr);
      // a write attempt without update must not land
      db_we = 1; wr_addr = 8'($urandom); din = CW'($urandom);
      @(posedge clk); #1;
      checks++;
      if (dout !== model[a]) begin failures++; $display("FAIL addr %0d got %0d exp %0d", a, dout, model[a]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
