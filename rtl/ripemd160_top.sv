// ripemd160_top: high-throughput RIPEMD-160 hashing core.
//
// The message enters as a word stream and is padded into 512-bit blocks
// (padding_unit). The control unit issues one block every 16 cycles into a
// five-stage pipeline (ripemd160_pipeline) in which each stage runs one round
// of both lines with a pre-computed operation block, reading its message words
// from its own bank of the message register file. The last stage's results are
// folded into the chaining value by md_extraction, which outputs the 160-bit
// digest.
//
// Interface: in_* is the message word stream (see padding_unit), digest_valid
// pulses for one cycle with the digest of each message (h0 first, each word
// little-endian, i.e. the usual printed byte order). A message's digest
// appears 82 cycles after its last block entered the pipeline. Blocks of one
// message wait for the previous block's result, so full throughput (512 bits
// per 16 cycles) is reached on streams of one-block messages; longer messages
// run at one block per 96 cycles. The block diagram follows the source; the
// interfaces are this design's choices.
module ripemd160_top
  import rmd_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  word_t        in_data,
  input  logic [2:0]   in_bytes,
  input  logic         in_last,
  output logic         digest_valid,
  output logic [159:0] digest
);

  block_t     blk_data;
  logic       blk_valid, blk_ready, blk_first, blk_last;
  logic [3:0] phase;
  tag_t       td_issue, td_exit;
  state_t     out_l, out_r, chain;
  logic       chain_done;

  padding_unit u_pad (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .in_data  (in_data),
    .in_bytes (in_bytes),
    .in_last  (in_last),
    .blk_valid(blk_valid),
    .blk_ready(blk_ready),
    .blk_data (blk_data),
    .blk_first(blk_first),
    .blk_last (blk_last)
  );

  control_unit u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .blk_valid (blk_valid),
    .blk_first (blk_first),
    .blk_last  (blk_last),
    .blk_ready (blk_ready),
    .chain     (chain),
    .chain_done(chain_done),
    .phase     (phase),
    .td_out    (td_issue)
  );

  ripemd160_pipeline u_pipe (
    .clk   (clk),
    .rst_n (rst_n),
    .phase (phase),
    .blk   (blk_data),
    .td_in (td_issue),
    .out_l (out_l),
    .out_r (out_r),
    .td_out(td_exit)
  );

  md_extraction u_mdx (
    .clk         (clk),
    .rst_n       (rst_n),
    .phase       (phase),
    .td_in       (td_exit),
    .in_l        (out_l),
    .in_r        (out_r),
    .chain       (chain),
    .chain_done  (chain_done),
    .digest_valid(digest_valid),
    .digest      (digest)
  );

endmodule
