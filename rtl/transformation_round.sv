// transformation_round: one pipeline stage of the RIPEMD-160 core.
//
// The stage computes one round (16 operations) for both parallel lines of the
// algorithm, each with its own op_block: the left line uses f_{ROUND+1} and
// the right line f_{5-ROUND}. Its constants_array instance supplies K, the
// word indices into this stage's message bank and the rotation amounts.
//
// The TEMP DATA register carries the block's tag (valid, last-of-message and
// the chaining value the block started from) alongside the block; it takes the
// previous stage's tag on `shift`.
//
// Timing: all stages share one phase counter. In phase 0 the stage loads
// in_l / in_r (the previous stage's results, which that stage produces in the
// same cycle, or the chaining value for stage 0) and its message bank must hold
// the block. out_l / out_r carry the round result in phase 0 of the next
// 16-cycle period. Read ports on rd_addr / rd_data: 0 = left port a,
// 1 = left port b, 2 = right port a, 3 = right port b.
module transformation_round
  import rmd_pkg::*;
#(
  parameter int unsigned ROUND = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [3:0]          phase,
  input  logic                shift,
  input  state_t              in_l,
  input  state_t              in_r,
  input  tag_t                td_in,
  output tag_t                td_out,
  output logic [3:0][3:0]     rd_addr,
  input  word_t [3:0]         rd_data,
  output state_t              out_l,
  output state_t              out_r
);

  word_t      k_l, k_r;
  logic [3:0] s_l, s_r;
  logic       load;

  assign load = (phase == 4'd0);

  constants_array #(.ROUND(ROUND)) u_const (
    .phase  (phase),
    .k_l    (k_l),
    .k_r    (k_r),
    .idx_a_l(rd_addr[0]),
    .idx_b_l(rd_addr[1]),
    .idx_a_r(rd_addr[2]),
    .idx_b_r(rd_addr[3]),
    .s_l    (s_l),
    .s_r    (s_r)
  );

  op_block #(.FSEL(ROUND)) u_left (
    .clk      (clk),
    .load     (load),
    .in_state (in_l),
    .x_a      (rd_data[0]),
    .x_b      (rd_data[1]),
    .k        (k_l),
    .s        (s_l),
    .out_state(out_l)
  );

  op_block #(.FSEL(NROUNDS - 1 - ROUND)) u_right (
    .clk      (clk),
    .load     (load),
    .in_state (in_r),
    .x_a      (rd_data[2]),
    .x_b      (rd_data[3]),
    .k        (k_r),
    .s        (s_r),
    .out_state(out_r)
  );

  // TEMP DATA: only the valid bit needs a reset.
  logic   valid_q, last_q;
  state_t h_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     valid_q <= 1'b0;
    else if (shift) valid_q <= td_in.valid;
  end

  always_ff @(posedge clk) begin
    if (shift) begin
      last_q <= td_in.last;
      h_q    <= td_in.h;
    end
  end

  assign td_out = '{valid: valid_q, last: last_q, h: h_q};

endmodule
