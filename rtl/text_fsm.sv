// text_fsm: text-recognition minor FSM. Reads the handwritten value digit
// and multiplier letter of the current grid block and returns their codes.
//
// Each character is written in a 10-row x 8-column box in the lower right
// of the block: the digit box at rows NUM_R0.., columns NUM_C0.., the
// multiplier box below it at rows MULT_R0.., columns MULT_C0.. (positions
// chosen by this design, inside the corner that the shape tests ignore and
// clear of the edge-check lines 58 and 59).
// Alignment, as in the document: the grid-paper line on the right of a
// block should fill column 63 and the one at the bottom row 63. If column
// 63 is not fully inked the FSM looks at column 62 and, if that one is,
// takes the block as shifted one pixel to the left; rows 63/62 likewise for
// a shift upwards. So one-pixel shifts are corrected.
// The 80 pixels of each box are then shifted into val_reg, one row per
// cycle, and compared with the pads of every candidate character: each
// character has "must touch" pads (its strokes) and "must not touch" pads
// (the strokes it lacks), built from the stroke codes in hdcr_pkg. A box
// that matches exactly one candidate gives that code; otherwise the digit
// is 4'hF and the multiplier 7 (none). The document's own pad drawings,
// including its "must (not) cross" pads, are replaced by this stroke-based
// set. The value is returned as three digit slots with the recognized digit
// in the lowest one and the other two 4'hF.
// Timing: start pulse, `finished` for one cycle about 35 cycles later with
// value/mult valid. `addr` drives both RAMs; row_word and col_word are
// their registered outputs.
module text_fsm
  import hdcr_pkg::*;
#(
  parameter int NUM_R0  = 38,
  parameter int NUM_C0  = 46,
  parameter int MULT_R0 = 48,
  parameter int MULT_C0 = 46
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  output logic [5:0]  addr,
  input  logic [63:0] row_word,
  input  logic [63:0] col_word,
  output logic [11:0] value,
  output logic [2:0]  mult,
  output logic        busy,
  output logic        finished
);
  typedef enum logic [4:0] {S_IDLE, S_DELAY0, S_RIGHT0, S_DELAY1, S_RIGHT1, S_BOT0, S_DELAY2,
                            S_BOT1, S_DELAY3, S_FILL_VAL, S_DELAY4, S_ANALYZE_VAL, S_DELAY5,
                            S_FILL_MULT, S_DELAY6, S_ANALYZE_MULT, S_DONE} state_t;
  state_t      state;
  logic        roff, boff;     // one-pixel shift found at the right / bottom
  logic [3:0]  i;              // box row being read
  logic [79:0] val_reg;
  logic [5:0]  c0;
  logic [7:0]  row_bits;

  // Candidate matching on the filled box.
  logic [3:0] n_dig, n_mul;
  logic [3:0] dig;
  logic [2:0] mul;
  always_comb begin
    n_dig = '0; dig = 4'hF;
    for (int d = 0; d < 10; d++)
      if (box_matches(val_reg, digit_segs(d))) begin n_dig++; dig = 4'(d); end
    n_mul = '0; mul = M_NONE;
    for (int m = 0; m < 7; m++)
      if (box_matches(val_reg, mult_segs(m))) begin n_mul++; mul = 3'(m); end
  end

  assign c0       = (state == S_FILL_MULT) ? 6'(MULT_C0 - int'(roff)) : 6'(NUM_C0 - int'(roff));
  assign row_bits = row_word[c0 +: 8];

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      value <= 12'hFFF;
      mult  <= M_NONE;
      roff  <= 1'b0;
      boff  <= 1'b0;
      i     <= '0;
    end else begin
      case (state)
        S_IDLE:   if (start) begin roff <= 1'b0; boff <= 1'b0; state <= S_DELAY0; end
        S_DELAY0: state <= S_RIGHT0;
        S_RIGHT0: state <= (&col_word) ? S_BOT0 : S_DELAY1;
        S_DELAY1: state <= S_RIGHT1;
        S_RIGHT1: begin roff <= &col_word; state <= S_BOT0; end
        S_BOT0:   state <= (&row_word) ? S_DELAY3 : S_DELAY2;
        S_DELAY2: state <= S_BOT1;
        S_BOT1:   begin boff <= &row_word; state <= S_DELAY3; end
        S_DELAY3: begin i <= '0; state <= S_FILL_VAL; end
        S_FILL_VAL, S_FILL_MULT: begin
          val_reg <= {row_bits, val_reg[79:8]};    // box row i ends at bits i*8 +: 8
          i       <= i + 1'b1;
          if (i == 4'd9) state <= (state == S_FILL_VAL) ? S_DELAY4 : S_DELAY6;
        end
        S_DELAY4:      state <= S_ANALYZE_VAL;
        S_ANALYZE_VAL: begin
          value <= {8'hFF, (n_dig == 4'd1) ? dig : 4'hF};
          state <= S_DELAY5;
        end
        S_DELAY5:      begin i <= '0; state <= S_FILL_MULT; end
        S_DELAY6:      state <= S_ANALYZE_MULT;
        S_ANALYZE_MULT: begin
          mult  <= (n_mul == 4'd1) ? mul : M_NONE;
          state <= S_DONE;
        end
        default: state <= S_IDLE;                 // S_DONE
      endcase
    end
  end

  // Address of the line whose data is needed in the next state.
  always_comb begin
    case (state)
      S_DELAY1, S_DELAY2: addr = 6'd62;
      S_DELAY3:           addr = 6'(NUM_R0 - int'(boff));
      S_FILL_VAL:         addr = 6'(NUM_R0 + int'(i) + 1 - int'(boff));
      S_DELAY5:           addr = 6'(MULT_R0 - int'(boff));
      S_FILL_MULT:        addr = 6'(MULT_R0 + int'(i) + 1 - int'(boff));
      default:            addr = 6'd63;
    endcase
  end

  assign busy     = (state != S_IDLE);
  assign finished = (state == S_DONE);
endmodule
