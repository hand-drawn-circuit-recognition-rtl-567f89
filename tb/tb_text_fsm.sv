// tb_text_fsm: writes the digits 0..9 (each with a multiplier letter) in
// the text corners of ten grid blocks, leaves an eleventh without text, and
// runs the text recognizer on every block twice: once aligned and once
// with the scan shifted one pixel up and left (the one-pixel shift the
// FSM must correct). Checks the digit slot, the two unused slots (F), the
// multiplier code and the ~35-cycle latency. Grid column 7 is skipped:
// a shifted scan there would run off the sheet and lose the border line. Row and column RAMs are
// behavioural, with a one-cycle registered read like the real ones.
`include "tb_common.svh"
module tb_text_fsm;
  import tb_img_pkg::*;
  import hdcr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start = 0;
  logic [5:0]  addr;
  logic [63:0] row_word_q, col_word_q;
  logic [11:0] value;
  logic [2:0]  mult;
  logic        busy, finished;

  text_fsm dut (.clk, .rst, .start, .addr, .row_word(row_word_q), .col_word(col_word_q),
                .value, .mult, .busy, .finished);

  logic [63:0] rowm [64], colm [64];
  always_ff @(posedge clk) begin
    row_word_q <= rowm[addr];
    col_word_q <= colm[addr];
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    clear(); grid();
    for (int d = 0; d < 10; d++) begin
      int p;
      p = d + d / 7;                                 // skip grid column 7
      draw_comp(p / 8, p % 8, T_RES_H);
      draw_char(p / 8, p % 8, 38, 46, digit_segs(d));
      draw_char(p / 8, p % 8, 48, 46, mult_segs(d % 7));
    end
    draw_comp(1, 3, T_WIRE_H);                       // block 11: no text
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 22; n++) begin
      int b, p, sh, cyc;
      b  = n % 11;
      p  = b + b / 7;
      sh = n / 11;
      for (int i = 0; i < 64; i++) begin
        rowm[i] = row_word(p / 8, p % 8, i, sh);
        colm[i] = col_word(p / 8, p % 8, i, sh);
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!finished && cyc < 1000) begin @(negedge clk); cyc++; end
      `CHECK(finished && cyc < 60, $sformatf("block %0d shift %0d latency %0d", b, sh, cyc))
      if (b < 10) begin
        `CHECK(value == {8'hFF, 4'(b)}, $sformatf("block %0d shift %0d value %h", b, sh, value))
        `CHECK(mult == 3'(b % 7), $sformatf("block %0d shift %0d mult %0d", b, sh, mult))
      end else begin
        `CHECK(value == 12'hFFF, $sformatf("empty box value %h", value))
        `CHECK(mult == M_NONE, $sformatf("empty box mult %0d", mult))
      end
    end
    `TB_END
  end
endmodule
