// md_extraction_tb: checks the final combination and the output pulses.
//
// Each period the bench offers a random tag at the shift (end of phase 15)
// and random line results in phase 0. For a valid block the new chaining
// value must equal the reference combination one cycle later; a last block
// must give one digest_valid pulse with the digest in printed byte order, any
// other valid block one chain_done pulse and leaves the digest unchanged; an
// invalid tag gives neither.
module md_extraction_tb;
  import rmd_pkg::*;
  import rmd_ref_pkg::*;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [3:0]   phase = 4'd0;
  tag_t         td_in = '0;
  state_t       in_l = '0, in_r = '0;
  state_t       chain;
  logic         chain_done, digest_valid;
  logic [159:0] digest;

  md_extraction dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) phase <= phase + 4'd1;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic state_t to_state(st5_t v);
    return '{a: v[0], b: v[1], c: v[2], d: v[3], e: v[4]};
  endfunction
  function automatic st5_t rnd5();
    st5_t v;
    for (int i = 0; i < 5; i++) v[i] = $urandom;
    return v;
  endfunction

  int n_last = 0, n_chain = 0, n_idle = 0, n_pulses = 0;
  always @(posedge clk) if (rst_n && (chain_done || digest_valid)) n_pulses++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st5_t h, l, r, e;
    bit   v, lst;
    int   expect_pulses = 0;
    bit [159:0] last_dig = '0;
    bit   have_dig = 0;
    @(negedge clk);
    rst_n = 1'b1;
    // phase 0 now; move to phase 15
    repeat (15) @(negedge clk);
    for (int it = 0; it < 40; it++) begin
      h = rnd5(); l = rnd5(); r = rnd5();
      v = ($urandom_range(0, 3) != 0);
      lst = 1'($urandom);
      td_in = '{valid: v, last: lst, h: to_state(h)};
      @(negedge clk);               // phase 0
      td_in = '0;
      in_l = to_state(l);
      in_r = to_state(r);
      @(negedge clk);               // phase 1: outputs registered
      in_l = to_state(rnd5());
      in_r = to_state(rnd5());
      e = combine(h, l, r);
      if (v) begin
        expect_pulses++;
        check(chain == to_state(e), "new chaining value");
        check(chain_done == !lst && digest_valid == lst, "one pulse of the right kind");
        if (lst) begin
          check(digest == digest_of(e), "digest byte order");
          last_dig = digest_of(e);
          have_dig = 1;
        end else if (have_dig) begin
          check(digest == last_dig, "digest held over a non-last block");
        end
        if (lst) n_last++; else n_chain++;
      end else begin
        n_idle++;
        check(!chain_done && !digest_valid, "no pulse for an empty slot");
      end
      repeat (14) @(negedge clk);   // phase 15 again
    end
    check(n_pulses == expect_pulses, "pulses last exactly one cycle");
    check(n_last > 0 && n_chain > 0 && n_idle > 0, "all three cases occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
