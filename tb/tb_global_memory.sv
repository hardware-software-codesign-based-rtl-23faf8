// tb_global_memory: writes random result words at random addresses while
// reading others, and checks every read (one cycle latency) against a model.
module tb_global_memory;
  localparam int DEPTH = 64, DW = 64;
  logic clk = 0, we = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [DW-1:0] din = 0, rdata;
  logic [DW-1:0] model [DEPTH];
  bit written [DEPTH];
  int checks = 0, failures = 0;

  global_memory #(.DEPTH(DEPTH), .DW(DW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    bit chk;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      we = $urandom_range(1);
      waddr = 6'($urandom);
      din = {$urandom, $urandom};
      raddr = 6'($urandom);
      a = int'(raddr);
      chk = written[a] && !(we && waddr == raddr);
      @(posedge clk);
      if (we) begin model[waddr] = din; written[waddr] = 1; end
      #1;
      if (chk) begin
        checks++;
        if (rdata !== model[a]) begin failures++; $display("FAIL addr %0d", a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
