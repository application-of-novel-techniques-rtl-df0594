// op_block_tb: checks one pre-computed operation block against the textbook
// step function.
//
// For every round and both lines (each with its f) the bench loads a random
// start state, then feeds X and the rotation amount with the block's timing
// (X_1, X_2 in the load cycle, X_{t+2} while operation t finishes). After each
// of the 16 operations the block's output must equal the reference step, and
// the 16th result must appear in the cycle of the next load, with no extra
// cycle: 16 cycles per round. Back-to-back rounds are run, so the block is
// reloaded while it finishes the previous round.
module op_block_tb;
  import rmd_pkg::*;
  import rmd_ref_pkg::*;

  logic       clk = 1'b0;
  logic       load = 1'b0;
  state_t     in_state = '0;
  word_t      x_a = '0, x_b = '0, k = '0;
  logic [3:0] s = '0;
  state_t     out_l, out_r;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic state_t to_state(st5_t v);
    return '{a: v[0], b: v[1], c: v[2], d: v[3], e: v[4]};
  endfunction

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One instance per non-linear function; the bench drives them together and
  // checks the one of the round under test.
  state_t outs [5];
  for (genvar g = 0; g < 5; g++) begin : g_f
    op_block #(.FSEL(g)) u_op (.clk(clk), .load(load), .in_state(in_state), .x_a(x_a),
                               .x_b(x_b), .k(k), .s(s), .out_state(outs[g]));
  end

  initial begin
    blk16_t x;
    st5_t   v;
    st5_t   ref_v [17];
    int     rnd, fsel, j0;
    bit     right;
    @(negedge clk);
    for (int trial = 0; trial < 20; trial++) begin
      rnd   = trial % 5;
      right = (trial / 5) % 2;
      fsel  = right ? 4 - rnd : rnd;
      j0    = 16 * rnd;
      for (int i = 0; i < 16; i++) x[i] = $urandom;
      for (int i = 0; i < 5; i++) v[i] = $urandom;
      ref_v[0] = v;
      for (int t = 1; t <= 16; t++) ref_v[t] = step(ref_v[t-1], x, j0 + t - 1, right);
      // load cycle (also the cycle in which a previous round's op 16 finishes)
      load     = 1'b1;
      in_state = to_state(v);
      k        = right ? KR[rnd] : KL[rnd];
      x_a      = x[right ? RR[j0] : RL[j0]];
      x_b      = x[right ? RR[j0 + 1] : RL[j0 + 1]];
      s        = 4'(right ? SR[j0 + 15] : SL[j0 + 15]);
      @(negedge clk);
      load = 1'b0;
      for (int t = 1; t <= 15; t++) begin
        s   = 4'(right ? SR[j0 + t - 1] : SL[j0 + t - 1]);
        x_a = (t <= 14) ? x[right ? RR[j0 + t + 1] : RL[j0 + t + 1]] : $urandom;
        x_b = $urandom;
        #1;
        check(outs[fsel] == to_state(ref_v[t]),
              $sformatf("round %0d %s op %0d", rnd, right ? "right" : "left", t));
        @(negedge clk);
      end
      // operation 16 finishes while the next round is loaded
      s = 4'(right ? SR[j0 + 15] : SL[j0 + 15]);
      #1;
      check(outs[fsel] == to_state(ref_v[16]),
            $sformatf("round %0d %s op 16 (in the next load cycle)", rnd, right ? "right" : "left"));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
