// global_memory: result memory shared by the accelerator and the processor.
//
// Simple dual port: the accelerator side writes one result word per cycle
// (we, waddr, din); the processor side reads with a registered port (raddr
// sampled, rdata valid the next cycle). Each word is one match result
// { core number, pattern ID, protein number, location }. Write and read ports
// may be used at the same time. The document describes the memory's purpose
// and its connection to the address counter and concatenation circuit; the
// dual-port organisation and the default depth of 4096 results are this
// design's choices.
module global_memory #(
  parameter int unsigned DEPTH = ac_pkg::GM_DEPTH,
  parameter int unsigned DW    = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] din,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= din;
    rdata <= mem[raddr];
  end

endmodule
