// padding_unit: message padding for RIPEMD-160.
//
// Takes the message as a stream of 32-bit words and hands out 512-bit padded
// blocks of sixteen words. Bytes are packed little-endian: the first byte of
// each group of four is in bits 7:0, which is the word order RIPEMD-160 reads,
// so a word goes into the block unchanged. After the message the unit appends
// the byte 0x80, zero bytes, and the message length in bits as a 64-bit
// little-endian number in words 14 and 15, adding a second block when fewer
// than eight bytes are left after the 0x80 (or no room for it).
//
// Input handshake: in_valid / in_ready, in_data; in_last marks the final word
// and in_bytes (0..4) says how many of its bytes are message bytes (an empty
// message is one in_last word with in_bytes = 0). Words before the last must be
// full. Output handshake: blk_valid / blk_ready with blk_data, blk_first (first
// block of a message) and blk_last (last block). While a block waits for
// blk_ready no input is taken. The padding rule is the algorithm's (MD4
// style); the word-stream interface is this design's choice.
module padding_unit
  import rmd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  word_t       in_data,
  input  logic [2:0]  in_bytes,
  input  logic        in_last,
  output logic        blk_valid,
  input  logic        blk_ready,
  output block_t      blk_data,
  output logic        blk_first,
  output logic        blk_last
);

  typedef enum logic [0:0] {S_FILL, S_OUT} st_t;

  st_t         st;
  block_t      buf_q;
  logic [3:0]  wcnt;        // words already in buf_q
  logic [63:0] len_bits;    // message bits before the current word
  logic        first_q;     // next block handed out is a message's first
  logic        last_q;      // block in buf_q is the message's last
  logic        extra_q;     // one more (length-only) block follows
  logic        extra80_q;   // that block starts with the 0x80 byte

  logic        take;
  logic [63:0] len_total;
  block_t      padded;
  logic [6:0]  pos;         // bytes of the message in the final block

  assign in_ready  = (st == S_FILL);
  assign take      = in_valid && in_ready;
  assign blk_valid = (st == S_OUT);
  assign blk_data  = buf_q;
  assign blk_first = first_q;
  assign blk_last  = last_q;

  assign len_total = len_bits + {58'd0, in_bytes, 3'd0};
  assign pos       = {1'b0, wcnt, 2'b00} + {4'd0, in_bytes};

  // The block that the final word completes, padded as far as it can hold.
  always_comb begin
    padded = buf_q;
    for (int w = 0; w < NOPS; w++) begin
      if (w == int'(wcnt)) begin
        padded[w] = '0;
        for (int b = 0; b < 4; b++)
          if (b < int'(in_bytes)) padded[w][8*b +: 8] = in_data[8*b +: 8];
        if (in_bytes < 3'd4) padded[w][8*in_bytes[1:0] +: 8] = 8'h80;
      end else if (w > int'(wcnt)) begin
        padded[w] = (w == int'(wcnt) + 1 && in_bytes == 3'd4) ? 32'h0000_0080 : '0;
      end
    end
    if (pos <= 7'd55) begin
      padded[14] = len_total[31:0];
      padded[15] = len_total[63:32];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_FILL;
      wcnt     <= '0;
      len_bits <= '0;
      first_q  <= 1'b1;
      last_q   <= 1'b0;
      extra_q  <= 1'b0;
    end else begin
      case (st)
        S_FILL: if (take) begin
          if (in_last) begin
            st       <= S_OUT;
            len_bits <= len_total;
            last_q   <= (pos <= 7'd55);
            extra_q  <= (pos > 7'd55);
          end else begin
            len_bits <= len_bits + 64'd32;
            wcnt     <= wcnt + 4'd1;
            if (wcnt == 4'd15) begin
              st     <= S_OUT;
              last_q <= 1'b0;
            end
          end
        end
        S_OUT: if (blk_ready) begin
          first_q <= 1'b0;
          if (extra_q) begin
            extra_q <= 1'b0;
            last_q  <= 1'b1;
          end else begin
            st   <= S_FILL;
            wcnt <= '0;
            if (last_q) begin
              first_q  <= 1'b1;
              len_bits <= '0;
            end
          end
        end
        default: st <= S_FILL;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (take) begin
      if (in_last) begin
        buf_q     <= padded;
        extra80_q <= (pos == 7'd64);
      end else begin
        buf_q[wcnt] <= in_data;
      end
    end else if (st == S_OUT && blk_ready && extra_q) begin
      // length-only block
      buf_q     <= '0;
      buf_q[0]  <= extra80_q ? 32'h0000_0080 : 32'h0;
      buf_q[14] <= len_bits[31:0];
      buf_q[15] <= len_bits[63:32];
    end
  end

endmodule
