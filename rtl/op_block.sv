// op_block: one RIPEMD-160 operation block with spatial and temporal
// pre-computation. One instance executes the 16 operations of one round of one
// line, one operation per clock.
//
// How it works. The pipeline register of the stage sits in the middle of the
// operation instead of at its end. Each clock the "final calculation" half
// finishes operation t from the register, and in the same cycle the
// "pre-computation" half starts operation t+1 from the results:
//   pre-computation:  b*,c*,d*,e* <= b,c,d,e ;  Z <= W + f(b,c,d) ;  h <= h_in
//   final calculation: a_t = e*,  b_t = e* + ROL_s(Z),  c_t = b*,
//                      d_t = ROL_10(c*),  e_t = d*,  W = h,
//                      h_out = (X_{t+2} + K) + d*
// Because a_{t+1} = e_t = d_{t-1}, the term (X + K) + a of an operation is
// formed two operations ahead (h, then W), so the loop holds only two adders,
// f and the input multiplexer. a* is not stored: the final calculation never
// reads it (a_t comes from e*).
//
// Interface and timing. `load` selects multiplexer input 1: the start state
// in_state (chaining value or the previous round's result). In that cycle the
// block also initialises W = (X_1 + K) + a_0 and h = (X_2 + K) + e_0, using
// x_a = X_1 and x_b = X_2. In every other cycle x_a must carry X_{t+2} for the
// operation t whose final calculation runs, and s its rotation amount. With
// `load` in cycle 0, out_state holds the result of operation k in cycle k
// (k = 1..16); the result of operation 16 appears in the same cycle as the
// next `load`. The datapath needs no reset.
//
// The structure, the equations and the W/h initialisation follow the proposed
// operation block; the exact port set is this design's choice.
module op_block
  import rmd_pkg::*;
#(
  parameter int unsigned FSEL = 0  // non-linear function of this round: 0..4 = f1..f5
) (
  input  logic       clk,
  input  logic       load,
  input  state_t     in_state,
  input  word_t      x_a,
  input  word_t      x_b,
  input  word_t      k,
  input  logic [3:0] s,
  output state_t     out_state
);

  // Register between pre-computation and final calculation.
  word_t b_q, c_q, d_q, e_q, z_q, h_q;

  // ---------------- final calculation ----------------
  state_t fin;
  word_t  h_out;
  word_t  w;

  always_comb begin
    fin.a = e_q;
    fin.b = e_q + rol(z_q, {1'b0, s});
    fin.c = b_q;
    fin.d = rol(c_q, 5'd10);
    fin.e = d_q;
    w     = h_q;
    h_out = (x_a + k) + d_q;
  end

  // ---------------- multiplexer + pre-computation ----------------
  state_t m;       // multiplexer output
  word_t  w_m;     // W entering the pre-computation
  word_t  h_m;     // h entering the pre-computation

  always_comb begin
    if (load) begin
      m   = in_state;
      w_m = (x_a + k) + in_state.a;   // W_1 = (X_1 + K_1) + a_0
      h_m = (x_b + k) + in_state.e;   // h_1 = (X_2 + K_2) + e_0
    end else begin
      m   = fin;
      w_m = w;
      h_m = h_out;
    end
  end

  always_ff @(posedge clk) begin
    b_q <= m.b;
    c_q <= m.c;
    d_q <= m.d;
    e_q <= m.e;
    z_q <= w_m + fnl(FSEL, m.b, m.c, m.d);
    h_q <= h_m;
  end

  assign out_state = fin;

endmodule
