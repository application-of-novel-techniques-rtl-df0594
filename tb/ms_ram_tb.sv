// ms_ram_tb: checks the banked message register file against a queue model.
// Random blocks are shifted in, sometimes with idle cycles between shifts;
// every cycle all read ports of all banks get random addresses and must
// return the word of the block that the model says sits in that bank.
module ms_ram_tb;
  import rmd_pkg::*;

  localparam int NB = 5, NP = 4;

  logic                       clk = 1'b0;
  logic                       shift = 1'b0;
  block_t                     wr_block = '0;
  logic [NB-1:0][NP-1:0][3:0] rd_addr = '0;
  word_t [NB-1:0][NP-1:0]     rd_data;

  ms_ram #(.NBANK(NB), .NPORT(NP)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  block_t model [NB];
  int     filled = 0;

  initial begin
    @(negedge clk);
    for (int c = 0; c < 300; c++) begin
      shift = ($urandom_range(0, 2) == 0);
      for (int i = 0; i < 16; i++) wr_block[i] = $urandom;
      for (int b = 0; b < NB; b++)
        for (int p = 0; p < NP; p++) rd_addr[b][p] = 4'($urandom);
      #1;
      for (int b = 0; b < NB; b++)
        if (b < filled)
          for (int p = 0; p < NP; p++)
            check(rd_data[b][p] == model[b][rd_addr[b][p]],
                  $sformatf("bank %0d port %0d cycle %0d", b, p, c));
      @(posedge clk);
      if (shift) begin
        for (int b = NB - 1; b > 0; b--) model[b] = model[b-1];
        model[0] = wr_block;
        if (filled < NB) filled++;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
