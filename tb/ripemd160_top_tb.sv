// ripemd160_top_tb: end-to-end test of the RIPEMD-160 core at its default
// configuration.
//
// Streams messages through the word interface back to back and compares every
// digest, in order, with the reference model (rmd_ref_pkg), which is first
// checked against published RIPEMD-160 test vectors. It also checks the
// timing: one block enters every 16 cycles at most, a message's digest follows
// 82 cycles after its last block entered, and back-to-back one-block messages
// come out 16 cycles apart. Each mechanism of the design is counted and must
// occur: a one-block message, a message whose padding needs an extra block, an
// extra block that starts with the 0x80 byte, a chained multi-block message
// with its issue wait, and full-rate back-to-back digests. A closing burst of
// one-block messages must sustain exactly one block per 16 cycles.
module ripemd160_top_tb;
  import rmd_ref_pkg::*;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         in_valid = 1'b0;
  logic         in_ready;
  logic [31:0]  in_data = '0;
  logic [2:0]   in_bytes = '0;
  logic         in_last = 1'b0;
  logic         digest_valid;
  logic [159:0] digest;

  ripemd160_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- known-answer tests of the reference model ----------------
  typedef struct { string msg; bit [159:0] dig; } kat_t;
  kat_t kats[$] = '{
    '{"", 160'h9c1185a5c5e9fc54612808977ee8f548b2258d31},
    '{"a", 160'h0bdc9d2d256b3ee9daae347be6f4dc835a467ffe},
    '{"abc", 160'h8eb208f7e05d987a9b044a8e98c6b087f15a0bfc},
    '{"message digest", 160'h5d0689ef49d2fae572b881b123a85ffa21595f36},
    '{"abcdefghijklmnopqrstuvwxyz", 160'hf71c27109c692c1b56bbdceb5b9d2865b3708dbc},
    '{"abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq",
      160'h12a053384a9c0c88e405a06c27dcf49ada62eb2b},
    '{"ABCDEFGHIJKLMNOPQRSTUVWXYZabcdefghijklmnopqrstuvwxyz0123456789",
      160'hb0e20b6e3116640286ed3a87a5713079b21f5189},
    '{"12345678901234567890123456789012345678901234567890123456789012345678901234567890",
      160'h9b752e45573d4b39f4dbd3323cab82bf63326bfb}
  };

  // ---------------- stimulus and expectations ----------------
  typedef byte unsigned bq_t[$];
  bq_t         msgs[$];
  bit [159:0]  expect_q[$];
  int          n_msgs_out = 0;

  // mechanism counters
  int n_one_block = 0, n_extra_block = 0, n_extra80 = 0, n_multi = 0;
  int n_chain_wait = 0, n_back_to_back = 0;

  task automatic send(bq_t m);
    int n = m.size();
    int w = 0;
    do begin
      int nb = (n - 4 * w >= 4) ? 4 : n - 4 * w;
      logic [31:0] d = '0;
      for (int b = 0; b < nb; b++) d[8*b +: 8] = m[4*w + b];
      @(negedge clk);
      in_valid = 1'b1;
      in_data  = d;
      in_bytes = 3'(nb);
      in_last  = (4 * (w + 1) >= n);
      while (!in_ready) @(negedge clk);
      @(posedge clk);   // taken at this edge
      w++;
    end while (4 * w < n);
    @(negedge clk);
    in_valid = 1'b0;
    in_last  = 1'b0;
  endtask

  function automatic void classify(int n);
    int pos = n % 64;
    if (n <= 55) n_one_block++;
    if (n >= 56) n_multi++;
    if (pos > 55 || (pos == 0 && n > 0)) n_extra_block++;
    if (pos == 0 && n > 0) n_extra80++;
  endfunction

  // ---------------- monitors ----------------
  longint last_accept = -1000;
  longint last_digest = -1000;
  longint accept_cyc_q[$];   // issue cycle of each message's last block

  // sustained throughput: a burst of one-block messages must leave the core
  // one per 16 cycles (512 bits per 16 cycles)
  localparam int BURST = 24;
  int     burst_first = 0;
  longint burst_start = 0, burst_end = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.blk_valid && dut.u_ctrl.blk_ready) begin
      check(cyc - last_accept >= 16, "blocks enter at most once per 16 cycles");
      last_accept = cyc;
      if (dut.u_ctrl.blk_last) accept_cyc_q.push_back(cyc);
    end
    if (dut.u_ctrl.blk_valid && dut.u_ctrl.phase == 4'd15 && dut.u_ctrl.wait_chain)
      n_chain_wait++;
    if (digest_valid) begin
      longint acc;
      bit [159:0] exp_d;
      exp_d = expect_q.pop_front();
      acc = accept_cyc_q.pop_front();
      check(digest == exp_d, $sformatf("digest %0d: got %h expected %h", n_msgs_out, digest,
                                       exp_d));
      check(cyc - acc == 82, $sformatf("digest latency %0d cycles, expected 82", cyc - acc));
      if (cyc - last_digest == 16) n_back_to_back++;
      if (n_msgs_out == burst_first) burst_start = cyc;
      if (n_msgs_out == burst_first + BURST - 1) burst_end = cyc;
      last_digest = cyc;
      n_msgs_out++;
    end
  end

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bq_t m;
    // reference model against the published vectors
    foreach (kats[i]) begin
      str2bytes(kats[i].msg, m);
      check(hash(m) == kats[i].dig, $sformatf("reference model on \"%s\"", kats[i].msg));
      msgs.push_back(m);
    end
    // extra-block and chaining corner cases, then random messages
    for (int n = 52; n <= 72; n++) begin
      m.delete();
      for (int i = 0; i < n; i++) m.push_back(8'($urandom));
      msgs.push_back(m);
    end
    for (int k = 0; k < 40; k++) begin
      automatic int n = (k % 3 == 0) ? $urandom_range(0, 200) : $urandom_range(0, 55);
      m.delete();
      for (int i = 0; i < n; i++) m.push_back(8'($urandom));
      msgs.push_back(m);
    end
    m.delete();
    for (int i = 0; i < 128; i++) m.push_back(8'($urandom));
    msgs.push_back(m);
    // sustained-rate burst: one-block messages of at most 10 words
    burst_first = msgs.size();
    for (int k = 0; k < BURST; k++) begin
      automatic int n = $urandom_range(0, 40);
      m.delete();
      for (int i = 0; i < n; i++) m.push_back(8'($urandom));
      msgs.push_back(m);
    end

    foreach (msgs[i]) begin
      expect_q.push_back(hash(msgs[i]));
      classify(msgs[i].size());
    end

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    foreach (msgs[i]) send(msgs[i]);

    wait (n_msgs_out == msgs.size());
    repeat (20) @(posedge clk);
    check(!digest_valid, "no stray digest");

    $display("messages=%0d one_block=%0d extra_block=%0d extra_0x80_block=%0d multi_block=%0d",
             msgs.size(), n_one_block, n_extra_block, n_extra80, n_multi);
    $display("chain_waits=%0d back_to_back_digests=%0d", n_chain_wait, n_back_to_back);
    $display("burst of %0d one-block messages: %0d cycles from first to last digest (%0d per block)",
             BURST, burst_end - burst_start, (burst_end - burst_start) / (BURST - 1));
    check(burst_end - burst_start == 16 * (BURST - 1), "sustained rate of one block per 16 cycles");
    check(n_one_block > 0, "one-block message occurred");
    check(n_extra_block > 0, "extra padding block occurred");
    check(n_extra80 > 0, "extra block with leading 0x80 occurred");
    check(n_multi > 0, "multi-block message occurred");
    check(n_chain_wait > 0, "chaining wait occurred");
    check(n_back_to_back > 0, "full-rate back-to-back digests occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
