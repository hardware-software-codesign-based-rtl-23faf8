// rr_arbiter: round-robin merge of N valid/ready result streams into one.
//
// In each cycle the first requesting input at or after the priority pointer is
// granted; out_idx names it. The pointer moves past the granted input when the
// transfer is accepted, so no requester waits more than N-1 transfers. Grant
// and in_ready are combinational from in_valid, the pointer and out_ready. It
// funnels the results of several AC cores into the single write port of the
// global memory; the document does not say how the cores share that memory,
// so this merge is this design's choice.
module rr_arbiter #(
  parameter int unsigned N  = 4,
  parameter int unsigned DW = 32,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [N-1:0]      in_valid,
  input  logic [DW-1:0]     in_data [N],
  output logic [N-1:0]      in_ready,
  output logic              out_valid,
  output logic [DW-1:0]     out_data,
  output logic [IW-1:0]     out_idx,
  input  logic              out_ready
);

  logic [IW-1:0] ptr_q;
  logic          found;

  always_comb begin
    found   = 1'b0;
    out_idx = '0;
    for (int unsigned k = 0; k < N; k++) begin
      if (!found && in_valid[(int'(ptr_q) + k) % N]) begin
        found   = 1'b1;
        out_idx = IW'((int'(ptr_q) + k) % N);
      end
    end
  end

  assign out_valid = found;
  assign out_data  = in_data[out_idx];

  always_comb begin
    in_ready  = '0;
    if (found) in_ready[out_idx] = out_ready;
  end

  always_ff @(posedge clk) begin
    if (rst) ptr_q <= '0;
    else if (found && out_ready)
      ptr_q <= (int'(out_idx) == N - 1) ? '0 : IW'(out_idx + 1'b1);
  end

  // at most one input is granted, and only one that requests
  a_one_grant: assert property (@(posedge clk) disable iff (rst)
    $onehot0(in_ready) && (in_ready & ~in_valid) == '0)
    else $error("arbiter granted an idle or a second input");

endmodule
