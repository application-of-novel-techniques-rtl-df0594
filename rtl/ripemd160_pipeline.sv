// ripemd160_pipeline: the five-stage RIPEMD-160 compression pipeline.
//
// Stage r (0..4) computes round r+1 of both lines with a transformation_round;
// the message register file (ms_ram) keeps one bank per stage. Every 16 cycles
// (`shift`, phase 15) all blocks move one stage on: bank 0 and the stage-0 TEMP
// DATA take the newly issued block and its tag, and each later bank and tag
// take those of the stage before. In phase 0 every stage loads: stage 0 from
// the chaining value in its tag, stage r from the results stage r-1 finishes in
// the same cycle. So five independent blocks are in flight, one block leaves
// every 16 cycles, and a block's two-line result appears on out_l / out_r in
// phase 0, 80 cycles after the edge that issued it. Its tag leaves on td_out
// at the shift edge just before, so a consumer captures td_out at that edge.
//
// Ports: blk / td_in are sampled at the clock edge that ends phase 15. phase
// comes from the control unit. One stage per round follows the source; the
// shift-register handoff of message banks is this design's choice.
module ripemd160_pipeline
  import rmd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] phase,
  input  block_t     blk,
  input  tag_t       td_in,
  output state_t     out_l,
  output state_t     out_r,
  output tag_t       td_out
);

  logic shift;
  assign shift = (phase == 4'd15);

  logic  [NROUNDS-1:0][3:0][3:0] rd_addr;
  word_t [NROUNDS-1:0][3:0]      rd_data;

  ms_ram #(.NBANK(NROUNDS), .NPORT(4)) u_ms_ram (
    .clk     (clk),
    .shift   (shift),
    .wr_block(blk),
    .rd_addr (rd_addr),
    .rd_data (rd_data)
  );

  state_t sl [NROUNDS];
  state_t sr [NROUNDS];
  tag_t   td [NROUNDS];

  for (genvar r = 0; r < NROUNDS; r++) begin : g_round
    state_t in_l, in_r;
    tag_t   td_prev;
    if (r == 0) begin : g_first
      assign in_l    = td[0].h;
      assign in_r    = td[0].h;
      assign td_prev = td_in;
    end else begin : g_next
      assign in_l    = sl[r-1];
      assign in_r    = sr[r-1];
      assign td_prev = td[r-1];
    end

    transformation_round #(.ROUND(r)) u_round (
      .clk    (clk),
      .rst_n  (rst_n),
      .phase  (phase),
      .shift  (shift),
      .in_l   (in_l),
      .in_r   (in_r),
      .td_in  (td_prev),
      .td_out (td[r]),
      .rd_addr(rd_addr[r]),
      .rd_data(rd_data[r]),
      .out_l  (sl[r]),
      .out_r  (sr[r])
    );
  end

  assign out_l  = sl[NROUNDS-1];
  assign out_r  = sr[NROUNDS-1];
  assign td_out = td[NROUNDS-1];

endmodule
