// ideal_display: redraws the recognized circuit with clean sprites and
// annotates it with component values and node labels.
//
// On `active` the FSM starts the analysis module (an_start), clears the
// frame buffer to white, and waits for the analysis to finish. Then, for
// each grid block 0..63, it reads the results RAM word and the node value
// RAM slots of the block's four edges, and runs a list of drawing jobs:
//   job 0       the 64x64 component sprite from comp_rom;
//   jobs 1-3    the three value digits, 8x8 characters from char_rom at
//               block-relative (40,48), (48,48), (56,48);
//   job 4       the multiplier letter at (56,56);
//   jobs 5-12   two-digit node labels at the top (24,-8), left (-16,32),
//               right (48,32) and bottom (24,56) terminals.
// Blank blocks draw nothing; empty value slots, "no multiplier" and edges
// that are not terminals or carry no label are skipped; node labels are
// drawn only for components, not for wires and connectors. The negative
// offsets write into the neighbouring block, over the label that block
// would show for the same node. Positions, order, clearing, and drawing
// labels only for components follow the document; labels are shown as
// two decimal digits, which is this design's choice.
// The 512x512 drawing is centred like the raw bitmap (H_OFF bytes, V_OFF
// lines). Each video RAM byte write takes four cycles: ROM address, ROM
// data latched, write enable, hold. When all blocks are drawn the FSM
// waits with `done` high until `active` falls.
module ideal_display
  import hdcr_pkg::*;
#(
  parameter int RAM_DEPTH = 60000,
  parameter int H_OFF     = 18,
  parameter int V_OFF     = 44,
  localparam int AW = $clog2(RAM_DEPTH)
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
  output logic          done
);
  typedef enum logic [3:0] {S_IDLE, S_AN_START, S_CLR, S_AN_WAIT, S_BLK_RD, S_BLK_GET,
                            S_NODE_RD, S_NODE_GET, S_JOB, S_WRITE, S_NEXT_BLK, S_FIN} state_t;
  typedef enum logic [1:0] {PH_ADDR, PH_DATA, PH_WE, PH_HOLD} phase_t;

  state_t        state;
  phase_t        ph;
  logic [AW-1:0] clr_addr;
  logic [5:0]    g;
  result_t       res;
  logic [6:0]    nv [4];
  logic [1:0]    sd;
  logic [3:0]    job;
  logic [5:0]    wr;        // sprite row
  logic [2:0]    wk;        // byte within the sprite row
  logic [7:0]    byte_q;

  // ---- job description -------------------------------------------------
  logic       job_ok, job_sprite;
  int         jx, jy;       // byte and line offset inside the block
  logic [7:0] job_ch;
  always_comb begin
    edges_t e;
    int     s, dg;
    logic [6:0] lbl;
    e          = type_edges(res.ctype);
    job_ok     = 1'b0;
    job_sprite = 1'b0;
    jx         = 0;
    jy         = 0;
    job_ch     = " ";
    s          = 0;
    dg         = 0;
    lbl        = '0;
    if (job == 4'd0) begin
      job_sprite = 1'b1;
      job_ok     = (res.ctype != T_BLANK);
    end else if (job <= 4'd3) begin
      job_ch = digit_ascii(res.value[4*(3 - int'(job)) +: 4]);
      job_ok = (res.ctype != T_BLANK) && (res.value[4*(3 - int'(job)) +: 4] <= 4'd9);
      jx     = 4 + int'(job);
      jy     = 48;
    end else if (job == 4'd4) begin
      job_ch = mult_ascii(res.mult);
      job_ok = (res.ctype != T_BLANK) && (res.mult != M_NONE);
      jx     = 7;
      jy     = 56;
    end else begin
      s   = (int'(job) - 5) / 2;
      dg  = (int'(job) - 5) % 2;
      lbl = nv[s];
      job_ch = (dg == 0) ? ((lbl >= 7'd10) ? 8'(8'h30 + (int'(lbl) / 10) % 10) : " ")
                         : 8'(8'h30 + int'(lbl) % 10);
      job_ok = (res.ctype != T_BLANK) && !is_junction(res.ctype) &&
               (lbl != NODE_UNASSIGNED) && (edge_slot(g, 2'(s)) != 7'(NNODES)) &&
               ((s == 0 && e.top) || (s == 1 && e.bottom) || (s == 2 && e.left) ||
                (s == 3 && e.right));
      case (s)
        0:       begin jx = 3 + dg;  jy = -8; end
        1:       begin jx = 3 + dg;  jy = 56; end
        2:       begin jx = -2 + dg; jy = 32; end
        default: begin jx = 6 + dg;  jy = 32; end
      endcase
    end
  end

  // ---- sprite ROMs ---------------------------------------------------------
  logic [63:0] spr_bits;
  logic [7:0]  chr_bits;
  comp_rom u_comp (.clk, .ctype(res.ctype), .row(wr), .bits(spr_bits));
  char_rom u_char (.clk, .ch(job_ch), .row(wr[2:0]), .bits(chr_bits));

  logic last_row, last_byte;
  assign last_byte = job_sprite ? (wk == 3'd7) : 1'b1;
  assign last_row  = job_sprite ? (wr == 6'd63) : (wr == 6'd7);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      ph       <= PH_ADDR;
      clr_addr <= '0;
      g        <= '0;
      sd       <= '0;
      job      <= '0;
      wr       <= '0;
      wk       <= '0;
      res      <= '0;
      byte_q   <= '0;
      for (int k = 0; k < 4; k++) nv[k] <= NODE_UNASSIGNED;
    end else begin
      case (state)
        S_IDLE: if (active) begin
          clr_addr <= '0;
          ph       <= PH_ADDR;
          state    <= S_AN_START;
        end
        S_AN_START: state <= S_CLR;
        S_CLR: begin           // three cycles per cleared byte
          case (ph)
            PH_ADDR: ph <= PH_WE;
            PH_WE:   ph <= PH_HOLD;
            default: begin
              ph <= PH_ADDR;
              if (int'(clr_addr) == RAM_DEPTH - 1) state <= S_AN_WAIT;
              else clr_addr <= clr_addr + 1'b1;
            end
          endcase
        end
        S_AN_WAIT: if (an_done) begin g <= '0; state <= S_BLK_RD; end
        S_BLK_RD:  state <= S_BLK_GET;
        S_BLK_GET: begin res <= res_rdata; sd <= '0; state <= S_NODE_RD; end
        S_NODE_RD: state <= S_NODE_GET;
        S_NODE_GET: begin
          nv[sd] <= node_rdata;
          sd     <= sd + 1'b1;
          if (sd == 2'd3) begin job <= '0; state <= S_JOB; end
          else state <= S_NODE_RD;
        end
        S_JOB: begin
          if (job_ok) begin
            wr    <= '0;
            wk    <= '0;
            ph    <= PH_ADDR;
            state <= S_WRITE;
          end else if (job == 4'd12) state <= S_NEXT_BLK;
          else job <= job + 1'b1;
        end
        S_WRITE: begin
          case (ph)
            PH_ADDR: ph <= PH_DATA;
            PH_DATA: begin
              byte_q <= job_sprite ? ~spr_bits[63 - 8*int'(wk) -: 8] : ~chr_bits;
              ph     <= PH_WE;
            end
            PH_WE:   ph <= PH_HOLD;
            default: begin
              ph <= PH_ADDR;
              if (!last_byte) wk <= wk + 1'b1;
              else begin
                wk <= '0;
                if (!last_row) wr <= wr + 1'b1;
                else if (job == 4'd12) state <= S_NEXT_BLK;
                else begin
                  job   <= job + 1'b1;
                  state <= S_JOB;
                end
              end
            end
          endcase
        end
        S_NEXT_BLK: begin
          g     <= g + 1'b1;
          state <= (g == 6'd63) ? S_FIN : S_BLK_RD;
        end
        S_FIN: if (!active) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  logic [AW-1:0] draw_addr;
  assign draw_addr = AW'((V_OFF + int'(g[5:3]) * 64 + jy + int'(wr)) * 100 +
                         H_OFF + int'(g[2:0]) * 8 + jx + int'(wk));

  always_comb begin
    vram_we    = 1'b0;
    vram_addr  = clr_addr;
    vram_wdata = 8'hFF;
    if (state == S_CLR) vram_we = (ph == PH_WE);
    if (state == S_WRITE) begin
      vram_addr  = draw_addr;
      vram_wdata = byte_q;
      vram_we    = (ph == PH_WE);
    end
  end

  assign an_start  = (state == S_AN_START);
  assign res_addr  = g;
  assign node_addr = edge_slot(g, sd);
  assign done      = (state == S_FIN);
endmodule
