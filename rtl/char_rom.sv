// char_rom: 8x8 character sprites for the on-screen text.
//
// Given an ASCII code and a sprite row (0 = top) it returns that row's 8
// pixels one cycle later, bit 7 leftmost, 1 = ink. The glyphs are drawn
// from the nine-stroke codes of hdcr_pkg::ascii_segs on a 5x7 frame
// (strokes: top bar row 0, middle bar row 3, bottom bar row 6, sides and
// centre stems rows 1-2 and 4-5, in columns 1, 3 and 5; row 7 and
// columns 0, 6, 7 stay blank as spacing). The document uses a character
// ROM but does not give its font; this stroke font is this design's own.
// Characters without a glyph (space, control codes) are blank.
module char_rom
  import hdcr_pkg::*;
(
  input  logic       clk,
  input  logic [7:0] ch,
  input  logic [2:0] row,
  output logic [7:0] bits
);
  function automatic logic [7:0] glyph_row(seg_t s, int r);
    logic [7:0] b;
    b = '0;
    // column c maps to bit 7-c
    case (r)
      0: if (s[SEG_A]) b[6:2] = '1;
      3: if (s[SEG_G]) b[6:2] = '1;
      6: if (s[SEG_D]) b[6:2] = '1;
      1, 2: begin
        if (s[SEG_F]) b[6] = 1'b1;
        if (s[SEG_H]) b[4] = 1'b1;
        if (s[SEG_B]) b[2] = 1'b1;
      end
      4, 5: begin
        if (s[SEG_E]) b[6] = 1'b1;
        if (s[SEG_I]) b[4] = 1'b1;
        if (s[SEG_C]) b[2] = 1'b1;
      end
      default: ;
    endcase
    return b;
  endfunction

  always_ff @(posedge clk) bits <= glyph_row(ascii_segs(ch), int'(row));
endmodule
