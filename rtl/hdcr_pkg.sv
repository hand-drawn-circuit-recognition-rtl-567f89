// hdcr_pkg: types and constants shared by the hand-drawn circuit recognizer.
//
// The scanned sheet is an 8x8 grid of 64x64-pixel blocks (512x512 bitmap,
// 1 = ink). Every block is classified into one component type code, plus a
// value (three 4-bit digit slots, 4'hF = empty) and a 3-bit multiplier
// code; the three fields are packed into one 20-bit results-RAM word, the
// field widths matching the example results dump of the recognizer
// (type up to 29, value shown as three hex digits "fff", multiplier 0..7).
// The numbering of the type codes is this design's own.
//
// Characters (handwritten value digits and multiplier letters, and the
// glyphs drawn on screen) are described by nine stroke "segments":
// a top bar, b upper right, c lower right, d bottom bar, e lower left,
// f upper left, g middle bar, h upper centre stem, i lower centre stem.
// The recognizer's pads and the on-screen font are both derived from the
// same stroke codes; the stroke set is this design's own choice.
package hdcr_pkg;

  localparam int GRID      = 8;     // grid blocks per side
  localparam int BLK       = 64;    // pixels per block side
  localparam int IMG       = 512;   // bitmap side in pixels
  localparam int NBLOCKS   = 64;
  localparam int NNODES    = 112;   // interior block boundaries of the 8x8 grid
  localparam logic [6:0] NODE_UNASSIGNED = 7'd113;
  localparam logic [6:0] STACK_SOS       = 7'd127;  // start-of-stack symbol

  typedef enum logic [4:0] {
    T_BLANK    = 5'd0,
    T_PS_POS   = 5'd1,   // positive supply, terminal at bottom
    T_CONN_TR  = 5'd2,   // corner connectors
    T_CONN_TL  = 5'd3,
    T_CONN_BR  = 5'd4,
    T_CONN_BL  = 5'd5,
    T_TEE_LTR  = 5'd6,   // T-connectors found from edges alone
    T_TEE_LBR  = 5'd7,
    T_CROSS    = 5'd8,   // 4-way connector
    T_STUB_R   = 5'd9,   // single terminal on right / left: no component
    T_STUB_L   = 5'd10,
    T_PS_NEG   = 5'd11,  // negative supply, terminal at top
    T_GND      = 5'd12,  // ground, terminal at top
    T_RES_V    = 5'd13,
    T_CAP_V    = 5'd14,
    T_SRC_V    = 5'd15,
    T_WIRE_V   = 5'd16,
    T_RES_H    = 5'd17,
    T_CAP_H    = 5'd18,
    T_SRC_H    = 5'd19,
    T_WIRE_H   = 5'd20,
    T_NPN_L    = 5'd21,  // base on the left, collector top, emitter bottom
    T_TEE_LTB  = 5'd22,
    T_NPN_R    = 5'd23,  // base on the right
    T_TEE_RTB  = 5'd24
  } comp_t;

  typedef struct packed {
    comp_t       ctype;
    logic [11:0] value;   // three digit slots, most significant first
    logic [2:0]  mult;    // multiplier code, 7 = none
  } result_t;

  // Which specialised minor FSM the component chooser starts.
  typedef enum logic [2:0] {K_H2, K_V2, K_T1, K_LTB, K_RTB} shape_kind_t;

  // Multiplier codes
  localparam logic [2:0] M_FEMTO = 3'd0, M_PICO = 3'd1, M_NANO = 3'd2, M_MICRO = 3'd3,
                         M_MILLI = 3'd4, M_KILO = 3'd5, M_MEGA = 3'd6, M_NONE = 3'd7;

  typedef struct packed {
    logic top, bottom, left, right;
  } edges_t;

  // Which block edges of a component type are wire terminals.
  function automatic edges_t type_edges(comp_t t);
    case (t)
      T_PS_POS:              return '{0,1,0,0};
      T_CONN_TR:             return '{1,0,0,1};
      T_CONN_TL:             return '{1,0,1,0};
      T_CONN_BR:             return '{0,1,0,1};
      T_CONN_BL:             return '{0,1,1,0};
      T_TEE_LTR:             return '{1,0,1,1};
      T_TEE_LBR:             return '{0,1,1,1};
      T_CROSS:               return '{1,1,1,1};
      T_STUB_R:              return '{0,0,0,1};
      T_STUB_L:              return '{0,0,1,0};
      T_PS_NEG, T_GND:       return '{1,0,0,0};
      T_RES_V, T_CAP_V, T_SRC_V, T_WIRE_V: return '{1,1,0,0};
      T_RES_H, T_CAP_H, T_SRC_H, T_WIRE_H: return '{0,0,1,1};
      T_NPN_L, T_TEE_LTB:    return '{1,1,1,0};
      T_NPN_R, T_TEE_RTB:    return '{1,1,0,1};
      default:               return '{0,0,0,0};
    endcase
  endfunction

  // Wire junctions: every terminal of the block is the same electrical node.
  function automatic logic is_junction(comp_t t);
    case (t)
      T_CONN_TR, T_CONN_TL, T_CONN_BR, T_CONN_BL, T_TEE_LTR, T_TEE_LBR,
      T_CROSS, T_STUB_R, T_STUB_L, T_WIRE_V, T_WIRE_H, T_TEE_LTB, T_TEE_RTB:
        return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  // Components that appear as a line of the SPICE netlist (supplies and
  // ground only name nodes).
  function automatic logic is_netlist_part(comp_t t);
    case (t)
      T_RES_V, T_RES_H, T_CAP_V, T_CAP_H, T_SRC_V, T_SRC_H, T_NPN_L, T_NPN_R:
        return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  // ---------------------------------------------------------------------
  // Stroke segments. Bit order {a,b,c,d,e,f,g,h,i} = [8:0].
  typedef logic [8:0] seg_t;
  localparam int SEG_A = 8, SEG_B = 7, SEG_C = 6, SEG_D = 5, SEG_E = 4,
                 SEG_F = 3, SEG_G = 2, SEG_H = 1, SEG_I = 0;

  function automatic seg_t digit_segs(int d);
    case (d)
      0: return 9'b111111_000;
      1: return 9'b000000_011;
      2: return 9'b110110_100;
      3: return 9'b111100_100;
      4: return 9'b011001_100;
      5: return 9'b101101_100;
      6: return 9'b101111_100;
      7: return 9'b111000_000;
      8: return 9'b111111_100;
      9: return 9'b111101_100;
      default: return '0;
    endcase
  endfunction

  // Multiplier letters F, P, N, U, m, K, M (codes 0..6).
  function automatic seg_t mult_segs(int m);
    case (m)
      0: return 9'b100011_100;   // F
      1: return 9'b110011_100;   // P
      2: return 9'b111011_000;   // N
      3: return 9'b011111_000;   // U
      4: return 9'b001010_101;   // m
      5: return 9'b011011_100;   // K
      6: return 9'b111011_010;   // M
      default: return '0;
    endcase
  endfunction

  // Pad of one segment inside the 10-row x 8-column handwriting box.
  // Bit index r*8+c, r = row from the top, c = column from the left.
  function automatic logic [79:0] pad_mask(int s);
    logic [79:0] m;
    int r0, r1, c0, c1;
    case (s)
      SEG_A:   begin r0 = 0; r1 = 1; c0 = 2; c1 = 5; end
      SEG_B:   begin r0 = 2; r1 = 3; c0 = 6; c1 = 7; end
      SEG_C:   begin r0 = 6; r1 = 7; c0 = 6; c1 = 7; end
      SEG_D:   begin r0 = 8; r1 = 9; c0 = 2; c1 = 5; end
      SEG_E:   begin r0 = 6; r1 = 7; c0 = 0; c1 = 1; end
      SEG_F:   begin r0 = 2; r1 = 3; c0 = 0; c1 = 1; end
      SEG_G:   begin r0 = 4; r1 = 5; c0 = 2; c1 = 5; end
      SEG_H:   begin r0 = 2; r1 = 3; c0 = 3; c1 = 4; end
      default: begin r0 = 6; r1 = 7; c0 = 3; c1 = 4; end
    endcase
    m = '0;
    for (int r = 0; r < 10; r++)
      for (int c = 0; c < 8; c++)
        if (r >= r0 && r <= r1 && c >= c0 && c <= c1) m[r*8+c] = 1'b1;
    return m;
  endfunction

  typedef logic [79:0] pads_t [9];
  function automatic pads_t make_pads();
    pads_t p;
    for (int s = 0; s < 9; s++) p[s] = pad_mask(s);
    return p;
  endfunction
  localparam pads_t PADS = make_pads();

  // A box matches a stroke code when it touches every pad of a used stroke
  // and none of the pads of an unused one.
  function automatic logic box_matches(logic [79:0] box, seg_t code);
    logic ok;
    ok = 1'b1;
    for (int s = 0; s < 9; s++) begin
      if (code[s] && ((box & PADS[s]) == '0)) ok = 1'b0;
      if (!code[s] && ((box & PADS[s]) != '0)) ok = 1'b0;
    end
    return ok;
  endfunction

  // Stroke code of the on-screen glyph for an ASCII character.
  function automatic seg_t ascii_segs(logic [7:0] ch);
    case (ch)
      "0","1","2","3","4","5","6","7","8","9": return digit_segs(int'(ch) - 48);
      "F": return mult_segs(0);
      "P": return mult_segs(1);
      "N": return mult_segs(2);
      "U": return mult_segs(3);
      "m": return mult_segs(4);
      "K": return mult_segs(5);
      "M": return mult_segs(6);
      "R": return 9'b110011_101;
      "C": return 9'b100111_000;
      "V": return 9'b010001_001;
      "Q": return 9'b111111_001;
      "D": return 9'b011110_100;
      "-": return 9'b000000_100;
      default: return '0;
    endcase
  endfunction

  // ASCII of a multiplier code (space for none).
  function automatic logic [7:0] mult_ascii(logic [2:0] m);
    case (m)
      3'd0: return "F";
      3'd1: return "P";
      3'd2: return "N";
      3'd3: return "U";
      3'd4: return "m";
      3'd5: return "K";
      3'd6: return "M";
      default: return " ";
    endcase
  endfunction

  // ASCII of a digit slot (space for an empty slot).
  function automatic logic [7:0] digit_ascii(logic [3:0] d);
    return (d <= 4'd9) ? (8'h30 + {4'd0, d}) : " ";
  endfunction

  // Node value RAM slot of a block edge; returns NNODES when the edge is on
  // the sheet border. Slots 0..55 are horizontal boundaries below row r
  // (index r*8+c), slots 56..111 vertical boundaries right of column c
  // (index 56+r*7+c).
  function automatic logic [6:0] edge_slot(logic [5:0] loc, logic [1:0] side);
    logic [2:0] r, c;
    r = loc[5:3];
    c = loc[2:0];
    case (side)
      2'd0:    return (r == 0) ? 7'(NNODES) : 7'((int'(r) - 1) * 8 + int'(c));     // top
      2'd1:    return (r == 7) ? 7'(NNODES) : 7'(int'(r) * 8 + int'(c));           // bottom
      2'd2:    return (c == 0) ? 7'(NNODES) : 7'(56 + int'(r) * 7 + int'(c) - 1);  // left
      default: return (c == 7) ? 7'(NNODES) : 7'(56 + int'(r) * 7 + int'(c));      // right
    endcase
  endfunction

endpackage
