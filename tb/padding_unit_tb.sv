// padding_unit_tb: checks the padding unit against the reference padding.
//
// Random messages (0..200 bytes, plus every length around the one- and
// two-block boundaries) are streamed in as words; the consumer applies random
// back-pressure on blk_ready. Every block handed out must equal the reference
// padded block, with blk_first on a message's first block and blk_last on its
// last. The run counts messages needing an extra length block, and extra
// blocks that begin with the 0x80 byte; both must occur.
module padding_unit_tb;
  import rmd_pkg::*;
  import rmd_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       in_valid = 1'b0;
  logic       in_ready;
  word_t      in_data = '0;
  logic [2:0] in_bytes = '0;
  logic       in_last = 1'b0;
  logic       blk_valid;
  logic       blk_ready = 1'b0;
  block_t     blk_data;
  logic       blk_first, blk_last;

  padding_unit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { blk16_t b; bit first; bit last; } eb_t;
  eb_t exp_q[$];
  int  n_blocks = 0, n_extra = 0, n_extra80 = 0, n_msgs = 0;

  // consumer with random back-pressure
  always @(negedge clk) blk_ready = rst_n && ($urandom_range(0, 2) != 0);
  always @(posedge clk) if (rst_n && blk_valid && blk_ready) begin
    eb_t e;
    e = exp_q.pop_front();
    for (int w = 0; w < 16; w++) check(blk_data[w] == e.b[w], $sformatf("block %0d word %0d", n_blocks, w));
    check(blk_first == e.first && blk_last == e.last, $sformatf("block %0d flags", n_blocks));
    n_blocks++;
  end

  task automatic send(byte unsigned m[$]);
    int n = m.size();
    int w = 0;
    do begin
      int nb = (n - 4 * w >= 4) ? 4 : n - 4 * w;
      word_t d = '0;
      for (int b = 0; b < nb; b++) d[8*b +: 8] = m[4*w + b];
      @(negedge clk);
      in_valid = 1'b1;
      in_data  = d;
      in_bytes = 3'(nb);
      in_last  = (4 * (w + 1) >= n);
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      w++;
    end while (4 * w < n);
    @(negedge clk);
    in_valid = 1'b0;
    in_last  = 1'b0;
  endtask

  task automatic one(int n);
    byte unsigned m[$];
    blk16_t bl[$];
    for (int i = 0; i < n; i++) m.push_back(8'($urandom));
    pad(m, bl);
    foreach (bl[i]) exp_q.push_back('{b: bl[i], first: (i == 0), last: (i == bl.size() - 1)});
    if (n % 64 > 55 || (n % 64 == 0 && n > 0)) n_extra++;
    if (n % 64 == 0 && n > 0) n_extra80++;
    n_msgs++;
    send(m);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n <= 130; n++) one(n);
    for (int k = 0; k < 30; k++) one($urandom_range(0, 200));
    wait (exp_q.size() == 0);
    repeat (5) @(posedge clk);
    $display("messages=%0d blocks=%0d extra=%0d extra80=%0d", n_msgs, n_blocks, n_extra, n_extra80);
    check(n_extra > 0 && n_extra80 > 0, "extra length blocks occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
