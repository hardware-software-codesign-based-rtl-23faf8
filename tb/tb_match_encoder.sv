// tb_match_encoder: drives random match vectors into the encoder, obeying the
// rule that no new vector arrives while the encoder held in the previous
// cycle, with a randomly stalling consumer. Every vector must come out as its
// set pattern IDs, lowest first, each with the vector's tag, in order; hold
// must be high exactly while IDs would remain, and a single-bit vector with a
// ready consumer must pass without hold (one symbol per clock).
module tb_match_encoder;
  localparam int NPAT = 8, TAG_W = 12, IDW = 3;
  logic clk = 0, rst = 1;
  logic in_valid = 0;
  logic [NPAT-1:0] in_vec = 0;
  logic [TAG_W-1:0] in_tag = 0;
  logic out_valid, out_ready = 1, hold, pending;
  logic [IDW-1:0] out_id;
  logic [TAG_W-1:0] out_tag;
  int checks = 0, failures = 0;
  int exp_id[$], exp_tag[$];
  int single_no_hold = 0, multi_hold = 0;

  match_encoder #(.NPAT(NPAT), .TAG_W(TAG_W)) dut (.*);
  always #5 clk = ~clk;

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

  // consumer side: compare each accepted ID
  always @(posedge clk) if (!rst && out_valid && out_ready) begin
    check(exp_id.size() > 0, "unexpected output");
    if (exp_id.size() > 0) begin
      check(int'(out_id) == exp_id[0], $sformatf("id %0d exp %0d", out_id, exp_id[0]));
      check(int'(out_tag) == exp_tag[0], "tag");
      void'(exp_id.pop_front()); void'(exp_tag.pop_front());
    end
  end

  initial begin
    bit held;
    logic [NPAT-1:0] mp;
    mp = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    held = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      out_ready = (n < 500) ? 1'b1 : ($urandom_range(3) != 0);
      if (!held && $urandom_range(1)) begin
        int k;
        k = $urandom_range(2);
        in_valid = 1;
        in_vec = (k == 0) ? NPAT'(1 << $urandom_range(NPAT-1)) : NPAT'($urandom);
        in_tag = TAG_W'($urandom);
        for (int i = 0; i < NPAT; i++) if (in_vec[i]) begin exp_id.push_back(i); exp_tag.push_back(int'(in_tag)); end
      end else begin
        in_valid = 0;
      end
      #1;
      // reference: hold must be high exactly when bits remain after this cycle
      begin
        logic [NPAT-1:0] cur, rem;
        cur = (mp != 0) ? mp : (in_valid ? in_vec : '0);
        rem = cur;
        for (int i = 0; i < NPAT; i++)
          if (cur[i] && out_ready) begin rem[i] = 0; break; end
        check(out_valid == (cur != 0), "out_valid");
        check(hold == (rem != 0), $sformatf("hold %0b rem %b", hold, rem));
        check(pending == (mp != 0), "pending");
        if (in_valid && mp == 0 && $countones(in_vec) == 1 && out_ready) begin
          check(!hold, "single match must not hold"); single_no_hold++;
        end
        if (in_valid && $countones(in_vec) > 1) multi_hold++;
        mp = rem;
      end
      held = hold;
    end
    in_valid = 0; out_ready = 1;
    repeat (20) @(posedge clk);
    check(exp_id.size() == 0, "all IDs delivered");
    check(single_no_hold > 0 && multi_hold > 0, "both cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
