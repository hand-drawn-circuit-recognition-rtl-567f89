// tb_img_pkg: test-image builder shared by the testbenches.
//
// Holds a 512x512 bitmap (1 = ink) and draws into it what a user would put
// on the 8x8 grid sheet: grid-paper lines on the right column and bottom
// row of every block, component symbols centred in their block, and value
// digits and multiplier letters written with the recognizer's strokes in
// the lower-right text boxes. rom_word() packs the bitmap into image-ROM
// words (bit 63 = leftmost pixel); row_word()/col_word() give the words the
// row and column RAMs should hold for one block.
package tb_img_pkg;
  import hdcr_pkg::*;

  bit img [512][512];

  function automatic void clear();
    for (int y = 0; y < 512; y++) for (int x = 0; x < 512; x++) img[y][x] = 1'b0;
  endfunction

  function automatic void rect(int y0, int y1, int x0, int x1);
    for (int y = y0; y <= y1; y++)
      for (int x = x0; x <= x1; x++)
        if (y >= 0 && y < 512 && x >= 0 && x < 512) img[y][x] = 1'b1;
  endfunction

  function automatic void grid();
    for (int k = 0; k < 8; k++) begin
      rect(0, 511, k*64 + 63, k*64 + 63);
      rect(k*64 + 63, k*64 + 63, 0, 511);
    end
  endfunction

  // Block-relative drawing helpers; t = transpose (vertical variant).
  function automatic void brect(int br, int bc, int r0, int r1, int c0, int c1, bit t = 0);
    if (!t) rect(br*64 + r0, br*64 + r1, bc*64 + c0, bc*64 + c1);
    else    rect(br*64 + c0, br*64 + c1, bc*64 + r0, bc*64 + r1);
  endfunction

  function automatic void zigzag(int br, int bc, bit t);
    int off [8] = '{-10, -5, 0, 5, 10, 5, 0, -5};
    brect(br, bc, 31, 32, 0, 16, t);
    brect(br, bc, 31, 32, 47, 63, t);
    for (int c = 16; c < 48; c++) begin
      int a, b;
      a = 32 + off[(c - 16) % 8];
      b = 32 + off[(c - 15) % 8];
      brect(br, bc, (a < b) ? a : b, (a < b) ? b : a, c, c, t);
    end
  endfunction

  function automatic void diamond(int br, int bc);
    for (int r = 0; r < 64; r++)
      for (int c = 0; c < 64; c++) begin
        int d;
        d = ((r > 32) ? r - 32 : 32 - r) + ((c > 32) ? c - 32 : 32 - c);
        if (d >= 15 && d <= 16) brect(br, bc, r, r, c, c);
      end
  endfunction

  function automatic void draw_comp(int br, int bc, comp_t ty);
    edges_t e;
    e = type_edges(ty);
    case (ty)
      T_BLANK: ;
      T_RES_H, T_RES_V: zigzag(br, bc, ty == T_RES_V);
      T_CAP_H, T_CAP_V: begin
        bit t;
        t = (ty == T_CAP_V);
        brect(br, bc, 31, 32, 0, 28, t);
        brect(br, bc, 31, 32, 35, 63, t);
        brect(br, bc, 18, 45, 27, 28, t);
        brect(br, bc, 18, 45, 35, 36, t);
      end
      T_SRC_H, T_SRC_V: begin
        bit t;
        t = (ty == T_SRC_V);
        brect(br, bc, 31, 32, 0, 17, t);
        brect(br, bc, 31, 32, 47, 63, t);
        diamond(br, bc);
      end
      T_GND: begin
        brect(br, bc, 0, 31, 31, 32);
        brect(br, bc, 30, 31, 14, 49);
        brect(br, bc, 37, 38, 21, 42);
        brect(br, bc, 44, 45, 28, 35);
      end
      T_PS_NEG: begin
        brect(br, bc, 0, 41, 31, 32);
        brect(br, bc, 40, 41, 18, 45);
      end
      T_PS_POS: begin
        brect(br, bc, 23, 63, 31, 32);
        brect(br, bc, 23, 24, 18, 45);
      end
      T_NPN_L, T_NPN_R: begin
        bit m;
        m = (ty == T_NPN_R);
        for (int r = 0; r < 64; r++)
          for (int c0 = 0; c0 < 64; c0++) begin
            int c;
            bit p;
            c = m ? 63 - c0 : c0;
            p = (r >= 31 && r <= 32 && c <= 24) ||
                (c >= 23 && c <= 24 && r >= 18 && r <= 45) ||
                (c >= 31 && c <= 32 && (r <= 16 || r >= 48)) ||
                (r >= 16 && r <= 24 && c - (48 - r) >= 0 && c - (48 - r) <= 1) ||
                (r >= 40 && r <= 48 && c - (r - 16) >= 0 && c - (r - 16) <= 1);
            if (p) brect(br, bc, r, r, c0, c0);
          end
      end
      default: begin  // wires, connectors, T-connectors, stubs
        if (e.top)    brect(br, bc, 0, 32, 31, 32);
        if (e.bottom) brect(br, bc, 31, 63, 31, 32);
        if (e.left)   brect(br, bc, 31, 32, 0, 32);
        if (e.right)  brect(br, bc, 31, 32, 31, 63);
      end
    endcase
  endfunction

  // Character written with strokes into a 10x8 box at block-relative (r0,c0).
  function automatic void draw_char(int br, int bc, int r0, int c0, seg_t code);
    for (int s = 0; s < 9; s++)
      if (code[s]) begin
        logic [79:0] m;
        m = pad_mask(s);
        for (int k = 0; k < 80; k++)
          if (m[k]) brect(br, bc, r0 + k / 8, r0 + k / 8, c0 + k % 8, c0 + k % 8);
      end
  endfunction

  function automatic logic [63:0] rom_word(int a);
    logic [63:0] w;
    for (int k = 0; k < 64; k++) w[63 - k] = img[a / 8][(a % 8) * 64 + k];
    return w;
  endfunction

  // sh > 0 reads the block as if the scan were shifted up and left by sh
  function automatic bit pix_at(int y, int x);
    return (y >= 0 && y < 512 && x >= 0 && x < 512) ? img[y][x] : 1'b0;
  endfunction

  function automatic logic [63:0] row_word(int br, int bc, int r, int sh = 0);
    logic [63:0] w;
    for (int i = 0; i < 64; i++) w[i] = pix_at(br*64 + r + sh, bc*64 + i + sh);
    return w;
  endfunction

  function automatic logic [63:0] col_word(int br, int bc, int c, int sh = 0);
    logic [63:0] w;
    for (int i = 0; i < 64; i++) w[i] = pix_at(br*64 + i + sh, bc*64 + c + sh);
    return w;
  endfunction
endpackage
