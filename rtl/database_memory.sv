// database_memory: Database Memory (one Database Segment) holding the text to
// be searched, one symbol per word.
//
// Single port, registered read. While db_update is high the memory is in
// update mode: the address comes from wr_addr and a symbol is written when
// db_we is also high. While db_update is low the address comes from rd_addr
// and dout shows the symbol at that address one cycle later. The address
// multiplexer and the write-enable gating by the update signal follow the
// document's single-core figure; the depth (64 Ki symbols) is this design's
// choice, the document only says on-chip memory was used.
module database_memory #(
  parameter int unsigned DEPTH = ac_pkg::DB_DEPTH,
  parameter int unsigned CW    = ac_pkg::CHAR_W,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          db_update,
  input  logic          db_we,
  input  logic [AW-1:0] wr_addr,
  input  logic [CW-1:0] din,
  input  logic [AW-1:0] rd_addr,
  output logic [CW-1:0] dout
);

  logic [CW-1:0] mem [DEPTH];
  logic [AW-1:0] addr;

  assign addr = db_update ? wr_addr : rd_addr;

  always_ff @(posedge clk) begin
    if (db_update && db_we) mem[addr] <= din;
    dout <= mem[addr];
  end

endmodule
