// control_unit: operation sequencing and block issue for the RIPEMD-160 core.
//
// A free-running 4-bit phase counter numbers the 16 operation cycles of each
// period; all round stages run in lock step on it (phase 0: load, phase 15:
// hand blocks on). A padded block offered on the blk_* handshake is accepted
// only at the end of phase 15, and so one block can enter every 16 cycles.
//
// Chaining: the first block of a message starts from the RIPEMD-160 initial
// value. A later block needs the result of the block before it, which leaves
// the pipeline 81 cycles after that block entered. So after accepting a
// block that is not the last of its message the unit holds blk_ready low until
// md_extraction reports that block done (chain_done), and then issues the next
// block with `chain` as its chaining value. Blocks of different messages (each
// message's last block) follow each other every 16 cycles.
//
// td_out is the tag for the first stage and is sampled with blk at the edge
// ending phase 15. The counter and one-block-per-16-cycles rate follow the
// source's 16 cycles per block; the handshake and the chaining wait are this
// design's choices. The reset is asynchronous for the flops and also disables
// the chaining assertion while it is low, which is why lint sees it used both
// ways.
module control_unit
  import rmd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       blk_valid,
  input  logic       blk_first,
  input  logic       blk_last,
  output logic       blk_ready,
  input  state_t     chain,
  input  logic       chain_done,
  output logic [3:0] phase,
  output tag_t       td_out
);

  logic wait_chain;
  logic accept;

  assign blk_ready = (phase == 4'd15) && !wait_chain;
  assign accept    = blk_valid && blk_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= 4'd0;
      wait_chain <= 1'b0;
    end else begin
      phase <= phase + 4'd1;
      if (accept && !blk_last) wait_chain <= 1'b1;
      else if (chain_done)     wait_chain <= 1'b0;
    end
  end

  always_comb begin
    td_out.valid = accept;
    td_out.last  = blk_last;
    td_out.h     = blk_first ? IV : chain;
  end

  // A chained result can only come back for a block that is waited on.
  a_chain_expected: assert property (@(posedge clk) disable iff (!rst_n)
    chain_done |-> wait_chain);

endmodule
