// tb_mem_fsm: runs the memory-handling FSM on three grid blocks of a test
// image (behavioural ROM, real row/column RAMs) and compares every row and
// column word with the bitmap; also checks the cycle count per block.
`include "tb_common.svh"
module tb_mem_fsm;
  import tb_img_pkg::*;
  import hdcr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start = 0;
  logic [5:0]  block = 0;
  logic [11:0] rom_addr;
  logic [63:0] rom_data;
  logic        row_we, col_we, busy, finished;
  logic [5:0]  row_addr, col_addr;
  logic [63:0] row_wdata, row_rdata, col_wdata;

  mem_fsm dut (.*);

  logic [63:0] rom [4096];
  logic [63:0] rowm [64], colm [64];
  always_ff @(posedge clk) begin
    rom_data <= rom[rom_addr];
    if (row_we) rowm[row_addr] <= row_wdata;
    row_rdata <= rowm[row_addr];
    if (col_we) colm[col_addr] <= col_wdata;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    int blocks [3] = '{0, 29, 63};
    clear(); grid();
    draw_comp(0, 0, T_NPN_L); draw_comp(3, 5, T_CAP_V); draw_comp(7, 7, T_SRC_H);
    draw_char(3, 5, 38, 46, digit_segs(4));
    for (int a = 0; a < 4096; a++) rom[a] = rom_word(a);
    repeat (3) @(negedge clk);
    rst = 0;
    foreach (blocks[n]) begin
      int cyc, br, bc, bad_r, bad_c;
      br = blocks[n] / 8; bc = blocks[n] % 8;
      @(negedge clk); start = 1; block = 6'(blocks[n]);
      @(negedge clk); start = 0;
      cyc = 1;
      while (!finished && cyc < 20000) begin @(negedge clk); cyc++; end
      `CHECK(finished, "finished asserted")
      `CHECK(cyc == 1 + 64 * 2 + 64 * (64 * 2 + 1), $sformatf("cycles per block %0d", cyc))
      bad_r = 0; bad_c = 0;
      for (int i = 0; i < 64; i++) begin
        if (rowm[i] != row_word(br, bc, i)) bad_r++;
        if (colm[i] != col_word(br, bc, i)) bad_c++;
      end
      `CHECK(bad_r == 0, $sformatf("block %0d row RAM (%0d bad)", blocks[n], bad_r))
      `CHECK(bad_c == 0, $sformatf("block %0d column RAM (%0d bad)", blocks[n], bad_c))
      @(negedge clk);
      `CHECK(!busy, "back to idle")
    end
    `TB_END
  end
endmodule
