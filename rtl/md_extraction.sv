// md_extraction: message digest extraction of the RIPEMD-160 core.
//
// At the shift edge it captures the tag of the block leaving the last round
// stage (its own TEMP DATA). In the following phase 0 the two line results of
// that block are present on in_l / in_r, and the unit forms the new chaining
// value with the algorithm's final combination:
//   h0' = h1 + cL + dR,  h1' = h2 + dL + eR,  h2' = h3 + eL + aR,
//   h3' = h4 + aL + bR,  h4' = h0 + bL + cR
// The result is registered. For the last block of a message it is also put on
// `digest` as the 160-bit digest in byte order (h0 first, each word
// little-endian) with a one-cycle `digest_valid` pulse, and `digest` holds it
// until the next message's digest; for any other block it
// pulses `chain_done` so the next block of the message can be issued with
// `chain` as its chaining value. Outputs change one cycle after phase 0.
// The final combination is the algorithm's; the output format and the
// done/valid pulses are this design's choices.
module md_extraction
  import rmd_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic [3:0]   phase,
  input  tag_t         td_in,
  input  state_t       in_l,
  input  state_t       in_r,
  output state_t       chain,
  output logic         chain_done,
  output logic         digest_valid,
  output logic [159:0] digest
);

  function automatic word_t bswap(input word_t x);
    return {x[7:0], x[15:8], x[23:16], x[31:24]};
  endfunction

  logic   valid_q, last_q;
  state_t h_q;
  state_t h_new;
  logic   fire;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               valid_q <= 1'b0;
    else if (phase == 4'd15)  valid_q <= td_in.valid;
  end

  always_ff @(posedge clk) begin
    if (phase == 4'd15) begin
      last_q <= td_in.last;
      h_q    <= td_in.h;
    end
  end

  assign fire = valid_q && (phase == 4'd0);

  always_comb begin
    h_new.a = h_q.b + in_l.c + in_r.d;
    h_new.b = h_q.c + in_l.d + in_r.e;
    h_new.c = h_q.d + in_l.e + in_r.a;
    h_new.d = h_q.e + in_l.a + in_r.b;
    h_new.e = h_q.a + in_l.b + in_r.c;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chain_done   <= 1'b0;
      digest_valid <= 1'b0;
    end else begin
      chain_done   <= fire && !last_q;
      digest_valid <= fire && last_q;
    end
  end

  always_ff @(posedge clk) begin
    if (fire) chain <= h_new;
    if (fire && last_q)
      digest <= {bswap(h_new.a), bswap(h_new.b), bswap(h_new.c), bswap(h_new.d),
                 bswap(h_new.e)};
  end

endmodule
