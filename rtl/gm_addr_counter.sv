// gm_addr_counter: Global Memory Address Counter.
//
// Supplies the write address of the global memory. clear (at the start of a
// search) sets it to 0; every accepted result (inc) advances it. When DEPTH
// results have been written the memory is full: wr_en is then low, further
// results are dropped and 'overflow' stays set until the next clear, so the
// processor knows the result list is incomplete. count is the number of
// results stored. The counter itself follows the document; the full and
// overflow behaviour is this design's choice.
module gm_addr_counter #(
  parameter int unsigned DEPTH = ac_pkg::GM_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,
  input  logic          inc,
  output logic [AW-1:0] addr,
  output logic          wr_en,
  output logic [AW:0]   count,
  output logic          full,
  output logic          overflow
);

  logic [AW:0] cnt_q;
  logic        ovf_q;

  assign full     = (cnt_q == (AW+1)'(DEPTH));
  assign wr_en    = inc && !full;
  assign addr     = cnt_q[AW-1:0];
  assign count    = cnt_q;
  assign overflow = ovf_q;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      cnt_q <= '0;
      ovf_q <= 1'b0;
    end else if (inc) begin
      if (full) ovf_q <= 1'b1;
      else      cnt_q <= cnt_q + 1'b1;
    end
  end

endmodule
