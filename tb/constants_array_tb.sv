// constants_array_tb: checks the per-round constant generator of all five
// stages in every phase against the reference tables: K and K', the word
// indices (X_1 and X_2 in phase 0, X_{p+2} in phase p = 1..14) and the
// rotation amount of the operation finishing in each phase.
module constants_array_tb;
  import rmd_pkg::*;
  import rmd_ref_pkg::*;

  logic [3:0] phase;
  word_t      k_l [5], k_r [5];
  logic [3:0] ial [5], ibl [5], iar [5], ibr [5], sl [5], sr [5];

  for (genvar g = 0; g < 5; g++) begin : g_r
    constants_array #(.ROUND(g)) u_c (.phase(phase), .k_l(k_l[g]), .k_r(k_r[g]),
      .idx_a_l(ial[g]), .idx_b_l(ibl[g]), .idx_a_r(iar[g]), .idx_b_r(ibr[g]),
      .s_l(sl[g]), .s_r(sr[g]));
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 5; r++)
      for (int p = 0; p < 16; p++) begin
        automatic int ja = (p == 0) ? 0 : p + 1;
        automatic int js = (p == 0) ? 15 : p - 1;
        phase = 4'(p);
        #1;
        check(k_l[r] == KL[r] && k_r[r] == KR[r], $sformatf("K round %0d", r));
        if (p != 15)
          check(ial[r] == 4'(RL[16*r + ja]) && iar[r] == 4'(RR[16*r + ja]),
                $sformatf("port a index round %0d phase %0d", r, p));
        check(ibl[r] == 4'(RL[16*r + 1]) && ibr[r] == 4'(RR[16*r + 1]),
              $sformatf("port b index round %0d", r));
        check(sl[r] == 4'(SL[16*r + js]) && sr[r] == 4'(SR[16*r + js]),
              $sformatf("rotation round %0d phase %0d", r, p));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
