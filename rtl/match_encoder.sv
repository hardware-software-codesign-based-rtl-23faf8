// match_encoder: Match Vector to Pattern ID Encoder of the AC core.
//
// Converts the output match vector of the search engine (one bit per pattern
// that ends at the current symbol) into pattern identification numbers, one
// per cycle, lowest pattern number first. A state can complete several
// overlapping patterns at once; the encoder then keeps the bits it has not yet
// sent in a pending register and raises 'hold' so that the search stops until
// the last ID has been accepted. Each ID leaves with the tag (location and
// protein number) of the symbol that completed it.
//
// Interface: in_valid/in_vec/in_tag are sampled every cycle; in_valid must be
// low while hold was high in the previous cycle (the search engine does not
// step then); an assertion checks this rule. out_valid/out_id/out_tag form a
// valid/ready stream, taken from the pending register or, when nothing is
// pending, straight from the input; out_ready may depend on out_valid. hold is
// combinational: it is high when bits will remain after this cycle. With
// at most one match per symbol and out_ready high the encoder never holds, so
// the search runs at one symbol per clock. Converting bits to IDs follows the
// document; the serialisation and the hold signal are choices of this design.
module match_encoder #(
  parameter int unsigned NPAT  = ac_pkg::PATTERNS,
  parameter int unsigned TAG_W = 32,
  localparam int unsigned IDW  = (NPAT > 1) ? $clog2(NPAT) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [NPAT-1:0]  in_vec,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [IDW-1:0]   out_id,
  output logic [TAG_W-1:0] out_tag,
  input  logic             out_ready,
  output logic             hold,
  output logic             pending
);

  logic [NPAT-1:0]  pend_q, cur, rem;
  logic [TAG_W-1:0] tag_q;
  logic             pend_valid_q;

  always_comb begin
    cur     = pend_valid_q ? pend_q : (in_valid ? in_vec : '0);
    out_tag = pend_valid_q ? tag_q : in_tag;
    out_id  = '0;
    for (int i = NPAT - 1; i >= 0; i--)
      if (cur[i]) out_id = IDW'(i);
  end

  assign out_valid = |cur;

  always_comb begin
    rem = cur;
    if (out_valid && out_ready) rem[out_id] = 1'b0;
    hold = |rem;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pend_q       <= '0;
      pend_valid_q <= 1'b0;
      tag_q        <= '0;
    end else begin
      pend_q       <= rem;
      pend_valid_q <= |rem;
      tag_q        <= out_tag;
    end
  end

  assign pending = pend_valid_q;

  // Upstream stalls while hold is high, so a new vector never meets pending
  // bits; if it did, the new vector would be lost.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst)
    pend_valid_q |-> !in_valid)
    else $error("match vector arrived while IDs were still pending");

endmodule
