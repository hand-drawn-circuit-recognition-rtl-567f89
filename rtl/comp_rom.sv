// comp_rom: 64x64 component sprites for the redrawn ("ideal") circuit.
//
// Given a component type and a sprite row it returns the 64 pixels of that
// row one cycle later, bit 63 leftmost, 1 = ink. Rather than a stored
// table, every sprite is computed from the type: two-pixel-wide leads run
// from each terminal edge (rows/columns 31-32) to the centre for
// connectors and wires, or to the component body, which is a rectangle for
// a resistor, two plates for a capacitor, a diamond for a source, three
// shrinking bars for ground, a bar with a plus or minus sign for the
// supplies, and a base bar with slanted collector and emitter for an NPN
// transistor (mirrored when the base is on the right). The document keeps
// these sprites in a ROM but does not give them; these drawings are this
// design's own.
module comp_rom
  import hdcr_pkg::*;
(
  input  logic        clk,
  input  comp_t       ctype,
  input  logic [5:0]  row,
  output logic [63:0] bits
);
  function automatic logic in_rng(int v, int lo, int hi);
    return v >= lo && v <= hi;
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic logic pix(comp_t t, int r, int c0);
    edges_t e;
    logic   vl, hl;     // on the vertical / horizontal centre line
    int     c;
    e  = type_edges(t);
    c  = (t == T_NPN_R) ? 63 - c0 : c0;
    vl = in_rng(c, 31, 32);
    hl = in_rng(r, 31, 32);
    case (t)
      T_BLANK: return 1'b0;
      T_RES_H: return (hl && (c < 16 || c > 47)) ||
                      ((r == 24 || r == 39) && in_rng(c, 16, 47)) ||
                      ((c == 16 || c == 47) && in_rng(r, 24, 39));
      T_RES_V: return (vl && (r < 16 || r > 47)) ||
                      ((c == 24 || c == 39) && in_rng(r, 16, 47)) ||
                      ((r == 16 || r == 47) && in_rng(c, 24, 39));
      T_CAP_H: return (hl && (c <= 28 || c >= 35)) ||
                      (in_rng(c, 27, 28) && in_rng(r, 18, 45)) ||
                      (in_rng(c, 35, 36) && in_rng(r, 18, 45));
      T_CAP_V: return (vl && (r <= 28 || r >= 35)) ||
                      (in_rng(r, 27, 28) && in_rng(c, 18, 45)) ||
                      (in_rng(r, 35, 36) && in_rng(c, 18, 45));
      T_SRC_H: return (hl && (c < 16 || c > 47)) ||
                      in_rng(iabs(r - 32) + iabs(c - 32), 15, 16);
      T_SRC_V: return (vl && (r < 16 || r > 47)) ||
                      in_rng(iabs(r - 32) + iabs(c - 32), 15, 16);
      T_GND:   return (vl && r <= 32) ||
                      (in_rng(r, 31, 32) && in_rng(c, 14, 49)) ||
                      (in_rng(r, 38, 39) && in_rng(c, 21, 42)) ||
                      (in_rng(r, 45, 46) && in_rng(c, 28, 35));
      T_PS_NEG: return (vl && r <= 32) ||
                       (in_rng(r, 31, 32) && in_rng(c, 18, 45)) ||
                       (in_rng(r, 44, 45) && in_rng(c, 26, 37));
      T_PS_POS: return (vl && r >= 31) ||
                       (in_rng(r, 31, 32) && in_rng(c, 18, 45)) ||
                       (in_rng(r, 18, 19) && in_rng(c, 26, 37)) ||
                       (vl && in_rng(r, 13, 24));
      T_NPN_L, T_NPN_R:
               return (hl && c <= 24) ||                          // base lead
                      (in_rng(c, 23, 24) && in_rng(r, 18, 45)) || // base bar
                      (vl && (r <= 16 || r >= 47)) ||             // C and E leads
                      (in_rng(r, 16, 24) && in_rng(c - (48 - r), 0, 1)) ||
                      (in_rng(r, 40, 48) && in_rng(c - (r - 16), 0, 1));
      default: begin
        // junctions, wires and stubs: leads from each terminal edge to the
        // centre, and a dot where three or more meet
        logic p;
        p = (e.top    && vl && r <= 32) ||
            (e.bottom && vl && r >= 31) ||
            (e.left   && hl && c <= 32) ||
            (e.right  && hl && c >= 31);
        if (int'(e.top) + int'(e.bottom) + int'(e.left) + int'(e.right) >= 3 &&
            in_rng(r, 29, 34) && in_rng(c, 29, 34)) p = 1'b1;
        return p;
      end
    endcase
  endfunction

  logic [63:0] line;
  always_comb
    for (int c = 0; c < 64; c++) line[63 - c] = pix(ctype, int'(row), c);

  always_ff @(posedge clk) bits <= line;
endmodule
