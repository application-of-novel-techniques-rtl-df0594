// ms_ram: message schedule register file.
//
// One bank of sixteen 32-bit words per round stage. Bank r holds the message
// block that stage r is hashing, so every stage can read any word of its own
// block while the stages work on different blocks. When the stages hand their
// blocks on (`shift`, once every 16 cycles), every bank copies the bank before
// it and bank 0 takes the newly accepted block.
//
// Each bank has NPORT asynchronous read ports (two per line: X of the current
// look-ahead operation and X_2 for the load cycle). Writes take effect at the
// clock edge, so a read in the shift cycle still sees the old block.
// Banked, shift-on-handoff organisation and the port count are this design's
// choices; the source only names a register file of 32-bit words.
module ms_ram
  import rmd_pkg::*;
#(
  parameter int unsigned NBANK = NROUNDS,
  parameter int unsigned NPORT = 4
) (
  input  logic                             clk,
  input  logic                             shift,
  input  block_t                           wr_block,
  input  logic [NBANK-1:0][NPORT-1:0][3:0] rd_addr,
  output word_t [NBANK-1:0][NPORT-1:0]     rd_data
);

  block_t mem [NBANK];

  always_ff @(posedge clk) begin
    if (shift) begin
      mem[0] <= wr_block;
      for (int b = 1; b < NBANK; b++) mem[b] <= mem[b-1];
    end
  end

  always_comb begin
    for (int b = 0; b < NBANK; b++)
      for (int p = 0; p < NPORT; p++)
        rd_data[b][p] = mem[b][rd_addr[b][p]];
  end

endmodule
