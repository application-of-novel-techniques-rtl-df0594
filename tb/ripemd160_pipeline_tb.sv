// ripemd160_pipeline_tb: checks the five-stage round pipeline on its own.
//
// The bench runs its own phase counter and issues a random block with a random
// chaining value at the end of phase 15 of most periods (some periods left
// empty). Each block's two-line result must appear on out_l / out_r in phase 0
// exactly 80 cycles after issue, and must equal five rounds of the reference
// step function; the tag must leave on td_out at the shift edge before it.
module ripemd160_pipeline_tb;
  import rmd_pkg::*;
  import rmd_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [3:0] phase = 4'd0;
  block_t     blk;
  tag_t       td_in;
  state_t     out_l, out_r;
  tag_t       td_out;

  ripemd160_pipeline dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic state_t to_state(st5_t v);
    return '{a: v[0], b: v[1], c: v[2], d: v[3], e: v[4]};
  endfunction

  typedef struct { st5_t l; st5_t r; bit [159:0] h; bit last; } exp_t;
  exp_t exp_q[$];
  exp_t pend[$];
  int   n_issued = 0, n_bubbles = 0, n_out = 0;
  longint cyc = 0;
  longint issue_cyc[$];

  initial begin
    repeat (200 * 16) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) phase <= phase + 4'd1;
  end

  // expected result check: tag leaves at a shift edge, data follows in phase 0
  exp_t cur;
  bit   cur_valid = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (phase == 4'd0 && cur_valid) begin
      check(out_l == to_state(cur.l), $sformatf("left result of block %0d", n_out));
      check(out_r == to_state(cur.r), $sformatf("right result of block %0d", n_out));
      begin automatic longint d = cyc - issue_cyc.pop_front(); check(d == 80, $sformatf("result 80 cycles after issue, got %0d", d)); end
      n_out++;
      cur_valid = 1'b0;
    end
    if (phase == 4'd15 && td_out.valid) begin
      cur = exp_q.pop_front();
      check(td_out.h == cur.h && td_out.last == cur.last, "tag leaves with its block");
      cur_valid = 1'b1;
    end
  end

  initial begin
    blk   = '0;
    td_in = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int p = 0; p < 60; p++) begin
      // drive during phase 15 of each period
      while (phase != 4'd15) @(negedge clk);
      if (p >= 50 || $urandom_range(0, 5) == 0) begin
        td_in = '0;
        n_bubbles++;
      end else begin
        blk16_t x;
        st5_t h;
        exp_t e;
        for (int i = 0; i < 16; i++) begin x[i] = $urandom; blk[i] = x[i]; end
        for (int i = 0; i < 5; i++) h[i] = $urandom;
        td_in.valid = 1'b1;
        td_in.last  = 1'($urandom);
        td_in.h     = to_state(h);
        e.l = h; e.r = h;
        for (int r = 0; r < 5; r++) begin
          e.l = round16(e.l, x, r, 1'b0);
          e.r = round16(e.r, x, r, 1'b1);
        end
        e.h = td_in.h;
        e.last = td_in.last;
        exp_q.push_back(e);
        issue_cyc.push_back(cyc + 1);
        n_issued++;
      end
      @(negedge clk);
    end
    check(n_out == n_issued, "every issued block came out");
    check(n_bubbles > 0 && n_issued > 0, "bubbles and blocks both occurred");
    $display("issued=%0d bubbles=%0d out=%0d", n_issued, n_bubbles, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
