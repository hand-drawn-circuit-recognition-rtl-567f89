// shape_fsm: the specialised minor FSMs of the component chooser
// (h2term, v2term, t1term, ltb3 and rtb3 of the document), folded into one
// machine whose `kind` input says which of them is running.
//
// The FSM reads the block one line at a time, lines 4..59, and measures
// each line inside the same 4..59 window (the outer pixels hold the
// grid-paper lines): whether it is empty, whether it has ink in the centre
// band (pixels 26..37), and how many ink pixels it has. The lower right
// corner of the block (lines and pixels 38 and up) holds the handwritten
// value and multiplier, so pixels 38 and up of lines 38 and up are ignored.
// Kinds K_H2, K_LTB
// and K_RTB read the column RAM (one word per column, across the drawing),
// K_V2 and K_T1 the row RAM. From the whole block it keeps
//   discont  an empty line with ink on both sides of it,
//   gap_run  the longest run of non-empty lines with no ink in the centre,
//   thick    how many pixel positions carry ink in any line (the width
//            of the drawing across the lines),
//   tall     the largest ink count of a single line.
// Decisions, after the document's decision tree:
//   two-terminal (K_H2, K_V2): discontinuity = capacitor, gap = source,
//        thick = resistor, otherwise wire;
//   one-terminal at top (K_T1): discontinuity = ground, else negative supply;
//   three-terminal (K_LTB, K_RTB): a line (tall) as long as the block is a
//        straight-through wire, i.e. a T-connector; otherwise the line
//        ends in the bar at the base of an NPN transistor.
// The tests are the document's; the window, the centre band and the
// thresholds GAP_MIN and THICK_MIN, TEE_MIN are this design's choices.
// Timing: start pulse, then two cycles per line (address, then data), a
// decision cycle and `finished` for one cycle with `ctype` valid.
module shape_fsm
  import hdcr_pkg::*;
#(
  parameter int GAP_MIN   = 12,
  parameter int THICK_MIN = 8,
  parameter int TEE_MIN   = 50
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  shape_kind_t kind,
  output logic [5:0]  addr,
  input  logic [63:0] row_word,
  input  logic [63:0] col_word,
  output comp_t       ctype,
  output logic        busy,
  output logic        finished
);
  typedef enum logic [2:0] {S_IDLE, S_DELAY, S_EVAL, S_DECIDE, S_DONE} state_t;
  localparam logic [63:0] WINDOW = 64'h0FFF_FFFF_FFFF_FFF0;   // bits 4..59

  state_t      state;
  shape_kind_t k;
  logic [5:0]  idx;
  logic        seen_ink, gap_open, discont;
  logic [6:0]  run, gap_run, tall;
  logic [63:0] span;
  logic [6:0]  thick;

  logic [63:0] w;
  logic        empty, centre;
  logic [6:0]  cnt;

  always_comb begin
    w      = ((k == K_V2 || k == K_T1) ? row_word : col_word) & WINDOW;
    if (idx >= 6'd38) w[63:38] = '0;
    empty  = (w == '0);
    centre = |w[37:26];
    cnt    = 7'($countones(w));
    thick  = 7'($countones(span));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      ctype <= T_BLANK;
      k     <= K_H2;
      idx   <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          k        <= kind;
          idx      <= 6'd4;
          seen_ink <= 1'b0;
          gap_open <= 1'b0;
          discont  <= 1'b0;
          run      <= '0;
          gap_run  <= '0;
          tall     <= '0;
          span     <= '0;
          state    <= S_DELAY;
        end
        S_DELAY: state <= S_EVAL;
        S_EVAL: begin
          if (!empty) begin
            seen_ink <= 1'b1;
            if (gap_open) discont <= 1'b1;
          end else if (seen_ink) gap_open <= 1'b1;
          if (!empty && !centre) begin
            run <= run + 1'b1;
            if (run + 1'b1 > gap_run) gap_run <= run + 1'b1;
          end else run <= '0;
          if (cnt > tall) tall <= cnt;
          span  <= span | w;
          idx   <= idx + 1'b1;
          state <= (idx == 6'd59) ? S_DECIDE : S_DELAY;
        end
        S_DECIDE: begin
          case (k)
            K_H2, K_V2: begin
              if (discont)                       ctype <= (k == K_H2) ? T_CAP_H : T_CAP_V;
              else if (int'(gap_run) >= GAP_MIN) ctype <= (k == K_H2) ? T_SRC_H : T_SRC_V;
              else if (int'(thick) >= THICK_MIN) ctype <= (k == K_H2) ? T_RES_H : T_RES_V;
              else                               ctype <= (k == K_H2) ? T_WIRE_H : T_WIRE_V;
            end
            K_T1:    ctype <= discont ? T_GND : T_PS_NEG;
            K_LTB:   ctype <= (int'(tall) >= TEE_MIN) ? T_TEE_LTB : T_NPN_L;
            default: ctype <= (int'(tall) >= TEE_MIN) ? T_TEE_RTB : T_NPN_R;
          endcase
          state <= S_DONE;
        end
        default: state <= S_IDLE;        // S_DONE
      endcase
    end
  end

  assign addr     = idx;
  assign busy     = (state != S_IDLE);
  assign finished = (state == S_DONE);
endmodule
