// constants_array: per-round constant generator of the RIPEMD-160 pipeline.
//
// For the round stage ROUND (0..4) it turns the operation phase (0..15) of the
// stage into what both lines need from the constant tables: the round
// constants K and K', the message word indices that the operation block reads
// in this cycle, and the rotation amounts of the operation finishing now.
//
// Timing (see op_block): in phase 0 the block loads and needs X of operations
// 1 and 2 (word index ports a and b); in phase p = 1..14 it finishes operation
// p and needs X of operation p+2 on port a. Port a in phase 15 is unused and
// points at operation 1. The rotation amount is the one of the operation whose
// final calculation runs: operation p in phase p, operation 16 in phase 0.
// Purely combinational. The tables are the algorithm's; one instance per stage
// (rather than one shared array) is this design's choice, since all five
// stages work on different rounds at once.
module constants_array
  import rmd_pkg::*;
#(
  parameter int unsigned ROUND = 0
) (
  input  logic [3:0] phase,
  output word_t      k_l,
  output word_t      k_r,
  output logic [3:0] idx_a_l,
  output logic [3:0] idx_b_l,
  output logic [3:0] idx_a_r,
  output logic [3:0] idx_b_r,
  output logic [3:0] s_l,
  output logic [3:0] s_r
);

  localparam int unsigned BASE = ROUND * NOPS;

  logic [3:0] ja;   // 0-based operation whose X port a reads
  logic [3:0] js;   // 0-based operation whose rotation is needed

  always_comb begin
    ja = (phase == 4'd0) ? 4'd0 : phase + 4'd1;   // wraps to 0 in phase 15
    js = phase - 4'd1;                             // phase 0 -> operation 15
    k_l     = K_LEFT[ROUND];
    k_r     = K_RIGHT[ROUND];
    idx_a_l = R_LEFT[BASE + 32'(ja)];
    idx_b_l = R_LEFT[BASE + 1];
    idx_a_r = R_RIGHT[BASE + 32'(ja)];
    idx_b_r = R_RIGHT[BASE + 1];
    s_l     = S_LEFT[BASE + 32'(js)];
    s_r     = S_RIGHT[BASE + 32'(js)];
  end

endmodule
