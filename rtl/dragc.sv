// dragc: Search Engine Control and Database Read Address Generation Circuit.
//
// On start it clears the FSMs of its section, then walks the database memory
// from address 0 to db_size-1 and presents one symbol per cycle to the AC
// cores. A symbol is consumed (step) in a cycle where all cores of the section
// are ready; otherwise the address is held and the same symbol is presented
// again, which is how a multi-pattern match stalls the search. It keeps a
// protein counter that advances after every separator symbol (SEP_CODE) and
// an offset counter that restarts at 0 after every separator, so each symbol
// carries its protein number and its location inside that protein.
// done rises when the last symbol has been consumed and stays high until the
// next start; the section reports search completed once its cores are idle.
//
// The database memory has a registered read port. The read address output is
// the address the next symbol will come from: rd_addr = a+1 when a symbol is
// consumed, a otherwise, so the memory output always holds the symbol at the
// current address. Timing: start in cycle t, clear in t, first symbol
// presented in t+2; a database of K symbols with no stalls is consumed in
// cycles t+2 .. t+K+1 and done is high from t+K+2. The symbol output is the
// memory read data itself, without a register. The role of the block
// follows the document, as does tagging each match with its protein and its
// location in the protein; the separator counting and timing are this design's.
module dragc #(
  parameter int unsigned CW    = ac_pkg::CHAR_W,
  parameter int unsigned LOC_W = $clog2(ac_pkg::DB_DEPTH),
  parameter int unsigned PW    = ac_pkg::PROT_W,
  parameter int unsigned SEP   = (1 << CW) - 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [LOC_W:0]   db_size,   // number of symbols to search
  // database memory read port
  output logic [LOC_W-1:0] rd_addr,
  input  logic [CW-1:0]    rd_data,
  // symbol stream to the AC cores
  input  logic             all_ready,
  output logic             step,
  output logic             clear,
  output logic [CW-1:0]    sym,
  output logic [LOC_W-1:0] loc,     // offset of the symbol in its protein
  output logic [PW-1:0]    prot,
  output logic             busy,
  output logic             done
);

  typedef enum logic [1:0] {S_IDLE, S_PRIME, S_RUN} st_t;
  st_t              st_q;
  logic [LOC_W:0]   a_q, size_q;
  logic [PW-1:0]    prot_q;
  logic [LOC_W-1:0] off_q;
  logic             done_q;

  assign clear = (st_q == S_IDLE) && start;
  assign step  = (st_q == S_RUN) && (a_q < size_q) && all_ready;
  assign sym   = rd_data;
  assign loc   = off_q;
  assign prot  = prot_q;
  assign busy  = (st_q != S_IDLE);
  assign done  = done_q;

  always_comb begin
    if (clear)     rd_addr = '0;
    else if (step) rd_addr = LOC_W'(a_q + 1'b1);
    else           rd_addr = a_q[LOC_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st_q   <= S_IDLE;
      a_q    <= '0;
      size_q <= '0;
      prot_q <= '0;
      off_q  <= '0;
      done_q <= 1'b0;
    end else begin
      case (st_q)
        S_IDLE: if (start) begin
          st_q   <= S_PRIME;
          a_q    <= '0;
          size_q <= db_size;
          prot_q <= '0;
          off_q  <= '0;
          done_q <= 1'b0;
        end
        S_PRIME: begin
          if (size_q == '0) begin
            st_q   <= S_IDLE;
            done_q <= 1'b1;
          end else begin
            st_q <= S_RUN;
          end
        end
        S_RUN: if (step) begin
          a_q <= a_q + 1'b1;
          if (rd_data == CW'(SEP)) begin
            prot_q <= prot_q + 1'b1;
            off_q  <= '0;
          end else begin
            off_q  <= off_q + 1'b1;
          end
          if (a_q + 1'b1 == size_q) begin
            st_q   <= S_IDLE;
            done_q <= 1'b1;
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

endmodule
