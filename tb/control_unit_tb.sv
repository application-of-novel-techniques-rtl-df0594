// control_unit_tb: checks phase counting, the issue window and the chaining
// wait of the control unit.
//
// The phase must count 0..15 from reset; blk_ready may only be high in phase
// 15; after a non-last block is accepted no block may be accepted until
// chain_done, after which the next block is accepted at the next phase 15 with
// `chain` as its chaining value. First blocks carry the initial value, and a
// last block does not stop the following message.
module control_unit_tb;
  import rmd_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       blk_valid = 1'b0, blk_first = 1'b0, blk_last = 1'b0;
  logic       blk_ready;
  state_t     chain = '0;
  logic       chain_done = 1'b0;
  logic [3:0] phase;
  tag_t       td_out;

  control_unit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phase and ready-window checks every cycle
  int exp_phase = 0;
  always @(negedge clk) if (rst_n) begin
    check(phase == 4'(exp_phase), "phase counts 0..15");
    check(!blk_ready || phase == 4'd15, "ready only in phase 15");
    check(td_out.valid == (blk_valid && blk_ready), "tag valid is the accept");
  end
  always @(posedge clk) if (rst_n) exp_phase <= (exp_phase + 1) % 16;

  int n_wait = 0;

  // offers a block and waits for it to be taken; returns the accept cycle's tag
  task automatic issue(bit first, bit last, output tag_t t);
    blk_valid = 1'b1; blk_first = first; blk_last = last;
    forever begin
      @(negedge clk);
      if (blk_ready) begin
        t = td_out;
        break;
      end
      if (phase == 4'd15) n_wait++;
    end
    @(posedge clk);
    #1 blk_valid = 1'b0;
  endtask

  initial begin
    tag_t t;
    state_t c;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int msg = 0; msg < 6; msg++) begin
      automatic int nblk = (msg % 2 == 0) ? 1 : 3;
      for (int b = 0; b < nblk; b++) begin
        issue(b == 0, b == nblk - 1, t);
        check(t.valid, "accepted");
        check(t.last == (b == nblk - 1), "last flag passed on");
        if (b == 0) check(t.h == IV, "first block starts from the initial value");
        else        check(t.h == c, "later block starts from the chained value");
        if (b != nblk - 1) begin
          // the result comes back 81 cycles later; nothing may be issued before
          blk_valid = 1'b1; blk_first = 1'b0; blk_last = 1'b0;
          repeat (80) begin
            @(negedge clk);
            check(!blk_ready, "held while the chain value is pending");
            if (phase == 4'd15) n_wait++;
          end
          blk_valid = 1'b0;
          c = '{a: $urandom, b: $urandom, c: $urandom, d: $urandom, e: $urandom};
          chain = c;
          chain_done = 1'b1;
          @(negedge clk);
          chain_done = 1'b0;
        end
      end
    end
    check(n_wait > 0, "issue wait occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
