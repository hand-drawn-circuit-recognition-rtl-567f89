// choose_fsm: component-chooser minor FSM of the recognizer. Finds which
// edges of the current grid block a drawn line crosses and from that
// either names the component directly or starts the specialised shape
// tests (shape_fsm) that tell the candidates apart.
//
// Edge check, as in the document: row 3 and column 3 are read together
// (same address to both RAMs), then row 4 / column 4, row 58 / column 58
// and row 59 / column 59, each after a delay state for the RAM latency.
// An edge is a terminal when both of its lines show ink inside pixels
// 4..59 (outside that window lie the grid-paper lines); requiring both
// lines is this design's choice. Edge combinations then map to:
//   none: blank; bottom: +supply; right or left alone: stub; top+right,
//   top+left, bottom+right, bottom+left: corner connectors; left+top+right
//   and left+bottom+right: T-connectors; all four: 4-way connector;
//   top: ground or -supply (K_T1); top+bottom: vertical R/C/source/wire
//   (K_V2); left+right: horizontal ones (K_H2); left+top+bottom and
//   right+top+bottom: NPN or T-connector (K_LTB, K_RTB).
// Timing: start pulse; `finished` high for one cycle with `ctype` valid
// about 10 cycles later for directly named blocks and about 120 cycles
// later when a shape test runs. `addr` drives both RAMs.
module choose_fsm
  import hdcr_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  output logic [5:0]  addr,
  input  logic [63:0] row_word,
  input  logic [63:0] col_word,
  output comp_t       ctype,
  output edges_t      edges,
  output logic        busy,
  output logic        finished
);
  typedef enum logic [3:0] {S_IDLE, S_DELAY0, S_TL0, S_DELAY1, S_TL1, S_DELAY2, S_BR0,
                            S_DELAY3, S_BR1, S_ANALYZE, S_SHAPE1, S_SHAPE2, S_DONE} state_t;
  localparam logic [63:0] WINDOW = 64'h0FFF_FFFF_FFFF_FFF0;

  state_t      state;
  logic        hit_row, hit_col;
  logic        t0, l0, b0, r0;
  shape_kind_t kind;
  logic        sh_start, sh_fin;
  logic [5:0]  sh_addr;
  comp_t       sh_type;

  assign hit_row = |(row_word & WINDOW);
  assign hit_col = |(col_word & WINDOW);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      ctype <= T_BLANK;
      edges <= '0;
      kind  <= K_H2;
    end else begin
      case (state)
        S_IDLE:   if (start) state <= S_DELAY0;
        S_DELAY0: state <= S_TL0;
        S_TL0:    begin t0 <= hit_row; l0 <= hit_col; state <= S_DELAY1; end
        S_DELAY1: state <= S_TL1;
        S_TL1:    begin edges.top <= t0 & hit_row; edges.left <= l0 & hit_col; state <= S_DELAY2; end
        S_DELAY2: state <= S_BR0;
        S_BR0:    begin b0 <= hit_row; r0 <= hit_col; state <= S_DELAY3; end
        S_DELAY3: state <= S_BR1;
        S_BR1:    begin edges.bottom <= b0 & hit_row; edges.right <= r0 & hit_col; state <= S_ANALYZE; end
        S_ANALYZE: begin
          state <= S_DONE;
          case (edges)
            4'b0000: ctype <= T_BLANK;
            4'b0100: ctype <= T_PS_POS;
            4'b0001: ctype <= T_STUB_R;
            4'b0010: ctype <= T_STUB_L;
            4'b1001: ctype <= T_CONN_TR;
            4'b1010: ctype <= T_CONN_TL;
            4'b0101: ctype <= T_CONN_BR;
            4'b0110: ctype <= T_CONN_BL;
            4'b1011: ctype <= T_TEE_LTR;
            4'b0111: ctype <= T_TEE_LBR;
            4'b1111: ctype <= T_CROSS;
            4'b1000: begin kind <= K_T1;  state <= S_SHAPE1; end
            4'b1100: begin kind <= K_V2;  state <= S_SHAPE1; end
            4'b0011: begin kind <= K_H2;  state <= S_SHAPE1; end
            4'b1110: begin kind <= K_LTB; state <= S_SHAPE1; end
            default: begin kind <= K_RTB; state <= S_SHAPE1; end   // 4'b1101
          endcase
        end
        S_SHAPE1: state <= S_SHAPE2;                 // start pulse to the minor FSM
        S_SHAPE2: if (sh_fin) begin
          ctype <= sh_type;
          state <= S_DONE;
        end
        default: state <= S_IDLE;                     // S_DONE
      endcase
    end
  end

  assign sh_start = (state == S_SHAPE1);

  shape_fsm u_shape (
    .clk, .rst,
    .start   (sh_start),
    .kind    (kind),
    .addr    (sh_addr),
    .row_word,
    .col_word,
    .ctype   (sh_type),
    .busy    (),
    .finished(sh_fin)
  );

  always_comb begin
    case (state)
      S_DELAY0, S_TL0: addr = 6'd3;
      S_DELAY1, S_TL1: addr = 6'd4;
      S_DELAY2, S_BR0: addr = 6'd58;
      S_DELAY3, S_BR1: addr = 6'd59;
      default:         addr = sh_addr;
    endcase
  end

  assign busy     = (state != S_IDLE);
  assign finished = (state == S_DONE);
endmodule
