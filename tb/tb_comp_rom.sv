// tb_comp_rom: checks the 64x64 component sprites. For every type, reads
// all 64 rows (one-cycle registered read) and checks: the blank type is
// empty; each terminal edge of the type has ink at its centre (row 0 or 63
// at columns 31-32, column 0 or 63 at rows 31-32) and each other edge has
// no ink at all; the NPN with the base on the right is the mirror image of
// the left one; and all 25 sprites differ.
`include "tb_common.svh"
module tb_comp_rom;
  import hdcr_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  comp_t       ctype = T_BLANK;
  logic [5:0]  row = 0;
  logic [63:0] bits;
  comp_rom dut (.clk, .ctype, .row, .bits);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  logic [63:0] spr [25][64];
  initial begin
    int n_same;
    for (int t = 0; t < 25; t++)
      for (int r = 0; r < 64; r++) begin
        @(negedge clk); ctype = comp_t'(t); row = 6'(r);
        @(negedge clk);
        spr[t][r] = bits;
      end
    for (int r = 0; r < 64; r++) `CHECK(spr[0][r] == 0, "blank sprite empty")
    for (int t = 1; t < 25; t++) begin
      edges_t e;
      logic   top_ink, bot_ink, left_ink, right_ink, top_mid, bot_mid, left_mid, right_mid;
      e = type_edges(comp_t'(t));
      top_ink = |spr[t][0];   bot_ink = |spr[t][63];
      left_ink = 0; right_ink = 0;
      for (int r = 0; r < 64; r++) begin left_ink |= spr[t][r][63]; right_ink |= spr[t][r][0]; end
      top_mid   = &spr[t][0][32:31];
      bot_mid   = &spr[t][63][32:31];
      left_mid  = spr[t][31][63] && spr[t][32][63];
      right_mid = spr[t][31][0] && spr[t][32][0];
      `CHECK(e.top    ? top_mid   : !top_ink,   $sformatf("type %0d top edge", t))
      `CHECK(e.bottom ? bot_mid   : !bot_ink,   $sformatf("type %0d bottom edge", t))
      `CHECK(e.left   ? left_mid  : !left_ink,  $sformatf("type %0d left edge", t))
      `CHECK(e.right  ? right_mid : !right_ink, $sformatf("type %0d right edge", t))
    end
    for (int r = 0; r < 64; r++) begin
      logic [63:0] m;
      for (int c = 0; c < 64; c++) m[c] = spr[int'(T_NPN_L)][r][63 - c];
      `CHECK(spr[int'(T_NPN_R)][r] == m, $sformatf("NPN mirror row %0d", r))
    end
    n_same = 0;
    for (int a = 0; a < 25; a++)
      for (int b = a + 1; b < 25; b++) begin
        bit same;
        same = 1;
        for (int r = 0; r < 64; r++) if (spr[a][r] != spr[b][r]) same = 0;
        if (same) n_same++;
      end
    `CHECK(n_same == 0, $sformatf("%0d pairs of identical sprites", n_same))
    `TB_END
  end
endmodule
