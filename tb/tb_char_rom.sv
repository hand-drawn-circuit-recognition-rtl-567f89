// tb_char_rom: checks the 8x8 stroke font. For every ASCII code and row:
// one-cycle registered read, row 7 and columns 0, 6, 7 blank; codes with
// no glyph (space, control codes) blank. The glyphs "8", "1" and "-" are
// compared with their expected rows, and all the characters the displays
// use (digits, multiplier letters, R C V Q D N P and "-") must differ.
`include "tb_common.svh"
module tb_char_rom;
  import hdcr_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] ch = 0, bits;
  logic [2:0] row = 0;
  char_rom dut (.clk, .ch, .row, .bits);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  logic [63:0] glyph [256];
  initial begin
    string used;
    int    n_bad_shape, n_dupe;
    logic [7:0] eight [8] = '{8'h7C, 8'h44, 8'h44, 8'h7C, 8'h44, 8'h44, 8'h7C, 8'h00};
    n_bad_shape = 0;
    for (int c = 0; c < 256; c++)
      for (int r = 0; r < 8; r++) begin
        @(negedge clk); ch = 8'(c); row = 3'(r);
        @(negedge clk);
        glyph[c][r * 8 +: 8] = bits;
        if (r == 7 && bits != 0) n_bad_shape++;
        if ((bits & 8'h83) != 0) n_bad_shape++;
      end
    `CHECK(n_bad_shape == 0, $sformatf("%0d rows outside the 5x7 frame", n_bad_shape))
    `CHECK(glyph[" "] == 0 && glyph[8'h0A] == 0 && glyph[8'h04] == 0, "blank codes")
    for (int r = 0; r < 8; r++)
      `CHECK(glyph["8"][r * 8 +: 8] == eight[r], $sformatf("'8' row %0d = %h", r, glyph["8"][r * 8 +: 8]))
    `CHECK(glyph["1"] == 64'h0000_1010_0010_1000,   // centre stem, rows 1-2 and 4-5
           $sformatf("'1' is a single stem: %h", glyph["1"]))
    `CHECK(glyph["-"] == 64'h0000_0000_7C00_0000, $sformatf("'-' is the middle bar: %h", glyph["-"]))
    used = "0123456789FPNUmKMRCVQD-";
    n_dupe = 0;
    for (int a = 0; a < used.len(); a++) begin
      if (glyph[used[a]] == 0) n_dupe++;
      for (int b = a + 1; b < used.len(); b++)
        if (glyph[used[a]] == glyph[used[b]]) n_dupe++;
    end
    `CHECK(n_dupe == 0, $sformatf("%0d used glyphs blank or identical", n_dupe))
    `TB_END
  end
endmodule
