// spice_display: writes a SPICE netlist of the recognized circuit into a
// text RAM (the spice RAM) and then draws that text on the screen.
//
// On `active` it starts the analysis module and waits for the node labels.
// It then reads the results RAM block by block; for every resistor,
// capacitor, source and NPN transistor it writes one 21-character line
// plus an end-of-line code (LF, 8'h0A):
//   col 0-2   label: component letter R/C/V/Q and a per-letter counter
//             starting at 1 (left aligned, "R1 ", "R12")
//   col 4-5, 7-8, 10-11   node labels of the terminals, two digits, right
//             aligned; "--" for a terminal without a label; the third
//             field is blank for two-terminal parts. Order: left, right or
//             top, bottom; for a transistor collector (top), base, emitter
//             (bottom) as SPICE expects
//   col 13-15 type: "DC " for sources, "NPN" for transistors, else blank
//   col 17-19 the three value digits (blank where empty), col 20 the
//             multiplier letter
// and finally an end-of-file code (EOT, 8'h04). Blank fields are spaces, so
// the columns line up. Next it clears the frame buffer and draws the text,
// one 8x8 char_rom sprite per character, 8 lines per text line, starting at
// byte X_OFF (centring 21 characters) and line V_OFF. When the text is
// drawn it waits with `done` high until `active` falls. The spice RAM has
// a second read port (ser_addr/ser_data) for the serial export module, and
// text_ready is high once the end-of-file code is written.
// The flow, field set, "DC"/"NPN" types, whitespace fill and 21-character
// line follow the document; the column layout, the codes for end of line
// and end of file, and the omission of supplies and ground from the list
// are this design's choices. Each video RAM byte write takes four cycles.
module spice_display
  import hdcr_pkg::*;
#(
  parameter int RAM_DEPTH  = 60000,
  parameter int TEXT_DEPTH = 2048,
  parameter int X_OFF      = 39,
  parameter int V_OFF      = 44,
  localparam int AW = $clog2(RAM_DEPTH),
  localparam int TW = $clog2(TEXT_DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          active,
  output logic          an_start,
  input  logic          an_done,
  output logic [5:0]    res_addr,
  input  result_t       res_rdata,
  output logic [6:0]    node_addr,
  input  logic [6:0]    node_rdata,
  output logic          vram_we,
  output logic [AW-1:0] vram_addr,
  output logic [7:0]    vram_wdata,
  input  logic [TW-1:0] ser_addr,
  output logic [7:0]    ser_data,
  output logic          text_ready,
  output logic          done
);
  localparam logic [7:0] CH_EOL = 8'h0A, CH_EOF = 8'h04;
  localparam int LINE_LEN = 22;        // 21 characters and end of line

  typedef enum logic [3:0] {S_IDLE, S_AN_START, S_AN_WAIT, S_BLK_RD, S_BLK_GET, S_NODE_RD,
                            S_NODE_GET, S_LINE, S_NEXT_BLK, S_EOF, S_CLR, S_RD, S_GET,
                            S_DRAW, S_FIN} state_t;
  typedef enum logic [1:0] {PH_ADDR, PH_DATA, PH_WE, PH_HOLD} phase_t;

  state_t        state;
  phase_t        ph;
  logic [5:0]    g;
  result_t       res;
  logic [6:0]    nv [4];
  logic [1:0]    sd;
  logic [4:0]    pos;                  // character within the line
  logic [6:0]    cnt_r, cnt_c, cnt_v, cnt_q;
  logic [TW-1:0] wptr, rptr;
  logic [AW-1:0] clr_addr;
  logic [5:0]    line;
  logic [4:0]    col;
  logic [2:0]    wr;
  logic [7:0]    ch_q, byte_q;
  logic          ready_q;

  // ---- spice RAM -------------------------------------------------------------
  logic [7:0]    text [TEXT_DEPTH];
  logic          t_we;
  logic [TW-1:0] t_addr;
  logic [7:0]    t_wdata, t_rdata;
  always_ff @(posedge clk) begin
    if (t_we) text[t_addr] <= t_wdata;
    t_rdata  <= text[t_addr];
    ser_data <= text[ser_addr];
  end

  // ---- line composition ------------------------------------------------------
  function automatic logic [15:0] two_digits(logic [6:0] n, logic valid);
    logic [7:0] hi, lo;
    if (!valid || n == NODE_UNASSIGNED) return "--";
    hi = (n >= 7'd10) ? 8'(8'h30 + (int'(n) / 10) % 10) : " ";
    lo = 8'(8'h30 + int'(n) % 10);
    return {hi, lo};
  endfunction

  logic [7:0] letter, line_ch;
  logic [6:0] count;
  logic [1:0] s1, s2, s3;              // node sides in SPICE order
  logic       three;
  always_comb begin
    logic [15:0] f;
    case (res.ctype)
      T_RES_H, T_RES_V: begin letter = "R"; count = cnt_r; end
      T_CAP_H, T_CAP_V: begin letter = "C"; count = cnt_c; end
      T_SRC_H, T_SRC_V: begin letter = "V"; count = cnt_v; end
      default:          begin letter = "Q"; count = cnt_q; end
    endcase
    three = (res.ctype == T_NPN_L || res.ctype == T_NPN_R);
    case (res.ctype)
      T_RES_H, T_CAP_H, T_SRC_H: begin s1 = 2'd2; s2 = 2'd3; s3 = 2'd0; end
      T_NPN_L:                   begin s1 = 2'd0; s2 = 2'd2; s3 = 2'd1; end
      T_NPN_R:                   begin s1 = 2'd0; s2 = 2'd3; s3 = 2'd1; end
      default:                   begin s1 = 2'd0; s2 = 2'd1; s3 = 2'd0; end
    endcase
    line_ch = " ";
    f       = "  ";
    case (int'(pos))
      0:  line_ch = letter;
      1:  line_ch = (count >= 7'd10) ? 8'(8'h30 + (int'(count) / 10) % 10) : 8'(8'h30 + int'(count));
      2:  line_ch = (count >= 7'd10) ? 8'(8'h30 + int'(count) % 10) : " ";
      4, 5:   begin f = two_digits(nv[s1], edge_slot(g, s1) != 7'(NNODES)); line_ch = (pos == 5'd4) ? f[15:8] : f[7:0]; end
      7, 8:   begin f = two_digits(nv[s2], edge_slot(g, s2) != 7'(NNODES)); line_ch = (pos == 5'd7) ? f[15:8] : f[7:0]; end
      10, 11: if (three) begin
                f = two_digits(nv[s3], edge_slot(g, s3) != 7'(NNODES));
                line_ch = (pos == 5'd10) ? f[15:8] : f[7:0];
              end
      13: line_ch = three ? "N" : (letter == "V") ? "D" : " ";
      14: line_ch = three ? "P" : (letter == "V") ? "C" : " ";
      15: line_ch = three ? "N" : " ";
      17: line_ch = digit_ascii(res.value[11:8]);
      18: line_ch = digit_ascii(res.value[7:4]);
      19: line_ch = digit_ascii(res.value[3:0]);
      20: line_ch = mult_ascii(res.mult);
      21: line_ch = CH_EOL;
      default: line_ch = " ";
    endcase
  end

  // ---- sprites ---------------------------------------------------------------
  logic [7:0] chr_bits;
  char_rom u_char (.clk, .ch(ch_q), .row(wr), .bits(chr_bits));

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      ph       <= PH_ADDR;
      g        <= '0;
      sd       <= '0;
      pos      <= '0;
      res      <= '0;
      wptr     <= '0;
      rptr     <= '0;
      clr_addr <= '0;
      line     <= '0;
      col      <= '0;
      wr       <= '0;
      ch_q     <= " ";
      byte_q   <= '0;
      ready_q  <= 1'b0;
      cnt_r    <= 7'd1;
      cnt_c    <= 7'd1;
      cnt_v    <= 7'd1;
      cnt_q    <= 7'd1;
      for (int k = 0; k < 4; k++) nv[k] <= NODE_UNASSIGNED;
    end else begin
      case (state)
        S_IDLE: if (active) begin
          g       <= '0;
          wptr    <= '0;
          ready_q <= 1'b0;
          cnt_r   <= 7'd1;
          cnt_c   <= 7'd1;
          cnt_v   <= 7'd1;
          cnt_q   <= 7'd1;
          state   <= S_AN_START;
        end
        S_AN_START: state <= S_AN_WAIT;
        S_AN_WAIT:  if (an_done) state <= S_BLK_RD;
        S_BLK_RD:   state <= S_BLK_GET;
        S_BLK_GET: begin
          res   <= res_rdata;
          sd    <= '0;
          state <= is_netlist_part(res_rdata.ctype) ? S_NODE_RD : S_NEXT_BLK;
        end
        S_NODE_RD:  state <= S_NODE_GET;
        S_NODE_GET: begin
          nv[sd] <= node_rdata;
          sd     <= sd + 1'b1;
          if (sd == 2'd3) begin pos <= '0; state <= S_LINE; end
          else state <= S_NODE_RD;
        end
        S_LINE: begin                    // one character per cycle
          wptr <= wptr + 1'b1;
          pos  <= pos + 1'b1;
          if (int'(pos) == LINE_LEN - 1) begin
            case (letter)
              "R": cnt_r <= cnt_r + 1'b1;
              "C": cnt_c <= cnt_c + 1'b1;
              "V": cnt_v <= cnt_v + 1'b1;
              default: cnt_q <= cnt_q + 1'b1;
            endcase
            state <= S_NEXT_BLK;
          end
        end
        S_NEXT_BLK: begin
          g     <= g + 1'b1;
          state <= (g == 6'd63) ? S_EOF : S_BLK_RD;
        end
        S_EOF: begin
          ready_q  <= 1'b1;
          clr_addr <= '0;
          ph       <= PH_ADDR;
          state    <= S_CLR;
        end
        S_CLR: begin
          case (ph)
            PH_ADDR: ph <= PH_WE;
            PH_WE:   ph <= PH_HOLD;
            default: begin
              ph <= PH_ADDR;
              if (int'(clr_addr) == RAM_DEPTH - 1) begin
                rptr  <= '0;
                line  <= '0;
                col   <= '0;
                state <= S_RD;
              end else clr_addr <= clr_addr + 1'b1;
            end
          endcase
        end
        S_RD:  state <= S_GET;
        S_GET: begin
          ch_q <= t_rdata;
          rptr <= rptr + 1'b1;
          if (t_rdata == CH_EOF) state <= S_FIN;
          else if (t_rdata == CH_EOL) begin
            line  <= line + 1'b1;
            col   <= '0;
            state <= S_RD;
          end else begin
            wr    <= '0;
            ph    <= PH_ADDR;
            state <= S_DRAW;
          end
        end
        S_DRAW: begin
          case (ph)
            PH_ADDR: ph <= PH_DATA;
            PH_DATA: begin byte_q <= ~chr_bits; ph <= PH_WE; end
            PH_WE:   ph <= PH_HOLD;
            default: begin
              ph <= PH_ADDR;
              if (wr == 3'd7) begin
                col   <= col + 1'b1;
                state <= S_RD;
              end else wr <= wr + 1'b1;
            end
          endcase
        end
        S_FIN: if (!active) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    t_we    = (state == S_LINE) || (state == S_EOF);
    t_addr  = (state == S_LINE || state == S_EOF) ? wptr : rptr;
    t_wdata = (state == S_EOF) ? CH_EOF : line_ch;
    vram_we    = 1'b0;
    vram_addr  = clr_addr;
    vram_wdata = 8'hFF;
    if (state == S_CLR) vram_we = (ph == PH_WE);
    if (state == S_DRAW) begin
      vram_addr  = AW'((V_OFF + int'(line) * 8 + int'(wr)) * 100 + X_OFF + int'(col));
      vram_wdata = byte_q;
      vram_we    = (ph == PH_WE);
    end
  end

  assign an_start   = (state == S_AN_START);
  assign res_addr   = g;
  assign node_addr  = edge_slot(g, sd);
  assign text_ready = ready_q;
  assign done       = (state == S_FIN);
endmodule
