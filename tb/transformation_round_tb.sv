// transformation_round_tb: checks all five round stages on their own.
//
// Each stage gets a bench model of its message bank (answering rd_addr with
// the block's words), a random start state per line in phase 0, and must put
// the reference result of its 16 operations on out_l / out_r in the next
// phase 0 (16 cycles later). Rounds follow each other back to back; the TEMP
// DATA register must take td_in at the phase-15 shift and hold it otherwise.
module transformation_round_tb;
  import rmd_pkg::*;
  import rmd_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [3:0] phase = 4'd0;
  logic       shift;
  tag_t       td_in = '0;
  state_t     in_l = '0, in_r = '0;
  block_t     blk = '0;

  tag_t            td_out [5];
  logic [3:0][3:0] rd_addr [5];
  word_t [3:0]     rd_data [5];
  state_t          out_l [5], out_r [5];

  assign shift = (phase == 4'd15);

  for (genvar g = 0; g < 5; g++) begin : g_r
    always_comb for (int p = 0; p < 4; p++) rd_data[g][p] = blk[rd_addr[g][p]];
    transformation_round #(.ROUND(g)) u_r (.clk(clk), .rst_n(rst_n), .phase(phase),
      .shift(shift), .in_l(in_l), .in_r(in_r), .td_in(td_in), .td_out(td_out[g]),
      .rd_addr(rd_addr[g]), .rd_data(rd_data[g]), .out_l(out_l[g]), .out_r(out_r[g]));
  end

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

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk16_t x;
    st5_t   vl, vr, el [5], er [5];
    bit     have = 0;
    tag_t   tg, tg_prev [5];
    @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 12; it++) begin
      // phase 0: load a new round, check the previous one
      if (have)
        for (int r = 0; r < 5; r++) begin
          check(out_l[r] == to_state(el[r]), $sformatf("round %0d left, iteration %0d", r, it));
          check(out_r[r] == to_state(er[r]), $sformatf("round %0d right, iteration %0d", r, it));
        end
      for (int i = 0; i < 16; i++) begin x[i] = $urandom; blk[i] = x[i]; end
      for (int i = 0; i < 5; i++) begin vl[i] = $urandom; vr[i] = $urandom; end
      in_l = to_state(vl);
      in_r = to_state(vr);
      for (int r = 0; r < 5; r++) begin
        el[r] = round16(vl, x, r, 1'b0);
        er[r] = round16(vr, x, r, 1'b1);
      end
      have = 1;
      @(negedge clk);
      in_l = '0;   // the stage must not depend on its input after the load
      in_r = '0;
      // phases 1..15: the tag is offered and taken at the end of phase 15
      for (int r = 0; r < 5; r++) tg_prev[r] = td_out[r];
      tg = '{valid: 1'($urandom), last: 1'($urandom), h: to_state('{$urandom, $urandom,
             $urandom, $urandom, $urandom})};
      td_in = tg;
      for (int p = 1; p < 15; p++) @(negedge clk);
      for (int r = 0; r < 5; r++)
        check(td_out[r] == tg_prev[r], "TEMP DATA holds between shifts");
      @(negedge clk);
      for (int r = 0; r < 5; r++)
        check(td_out[r] == tg, "TEMP DATA takes its input at the shift");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
