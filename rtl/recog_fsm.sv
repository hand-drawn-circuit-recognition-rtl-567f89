// recog_fsm: the recognition stage. Its major FSM walks the 64 grid blocks
// and, for each, runs three minor FSMs one after the other, then stores the
// block's result in the shared results RAM.
//
// Per block: MEM_HANDLE0/1 start mem_fsm and wait for it to copy the block
// into the row and column RAMs (64 x 64 bits each, instantiated here);
// COMP_RECOG0/1 start choose_fsm (component type); TEXT_RECOG0/1 start
// text_fsm (value digit and multiplier); RESULTS0/1 write the 20-bit result
// word in two steps (address and data, then write enable); RESULTS2 goes
// on to the next block through IDLE or, after block 63, to the three
// SCAN states, which read the results RAM addresses 0..63 in turn so the
// results can be watched on res_addr/res_rdata; DONE then holds
// `finished` high for good. The sequence is the document's. The row and
// column RAMs are shared: the minor FSM that is busy owns their address
// (this arbitration is this design's choice). After reset the FSM starts
// by itself, as in the document; a block takes about 8,600 cycles, the
// whole sheet about 550,000. The results RAM lives outside, so that the
// analysis and display modules can read it after `finished`.
module recog_fsm
  import hdcr_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  output logic [11:0] rom_addr,
  input  logic [63:0] rom_data,
  output logic        res_we,
  output logic [5:0]  res_addr,
  output result_t     res_wdata,
  output logic [5:0]  block,
  output logic        finished
);
  typedef enum logic [3:0] {S_IDLE, S_MEM0, S_MEM1, S_COMP0, S_COMP1, S_TEXT0, S_TEXT1,
                            S_RES0, S_RES1, S_RES2, S_SCAN1, S_SCAN2, S_SCAN3, S_DONE} state_t;
  state_t state;

  logic [5:0]  blk, scan;
  result_t     res_q;

  // Minor FSM handshakes
  logic mem_busy, mem_fin, ch_busy, ch_fin, tx_busy, tx_fin;
  logic row_we, col_we;
  logic [5:0]  mem_row_addr, mem_col_addr, ch_addr, tx_addr, row_addr, col_addr;
  logic [63:0] row_wdata, col_wdata, row_rdata, col_rdata;
  comp_t       ch_type;
  logic [11:0] tx_value;
  logic [2:0]  tx_mult;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      blk   <= '0;
      scan  <= '0;
      res_q <= '0;
    end else begin
      case (state)
        S_IDLE:  state <= S_MEM0;
        S_MEM0:  state <= S_MEM1;
        S_MEM1:  if (mem_fin) state <= S_COMP0;
        S_COMP0: state <= S_COMP1;
        S_COMP1: if (ch_fin) begin res_q.ctype <= ch_type; state <= S_TEXT0; end
        S_TEXT0: state <= S_TEXT1;
        S_TEXT1: if (tx_fin) begin
          res_q.value <= tx_value;
          res_q.mult  <= tx_mult;
          state       <= S_RES0;
        end
        S_RES0:  state <= S_RES1;
        S_RES1:  state <= S_RES2;
        S_RES2:  begin
          blk   <= blk + 1'b1;
          state <= (blk == 6'd63) ? S_SCAN1 : S_IDLE;
        end
        S_SCAN1: state <= S_SCAN2;
        S_SCAN2: state <= S_SCAN3;
        S_SCAN3: begin
          scan  <= scan + 1'b1;
          state <= (scan == 6'd63) ? S_DONE : S_SCAN1;
        end
        default: state <= S_DONE;
      endcase
    end
  end

  assign res_we    = (state == S_RES1);
  assign res_addr  = (state == S_SCAN1 || state == S_SCAN2 || state == S_SCAN3) ? scan : blk;
  assign res_wdata = res_q;
  assign block     = blk;
  assign finished  = (state == S_DONE);

  mem_fsm u_mem (
    .clk, .rst,
    .start    (state == S_MEM0),
    .block    (blk),
    .rom_addr,
    .rom_data,
    .row_we,
    .row_addr (mem_row_addr),
    .row_wdata,
    .row_rdata,
    .col_we,
    .col_addr (mem_col_addr),
    .col_wdata,
    .busy     (mem_busy),
    .finished (mem_fin)
  );

  choose_fsm u_choose (
    .clk, .rst,
    .start    (state == S_COMP0),
    .addr     (ch_addr),
    .row_word (row_rdata),
    .col_word (col_rdata),
    .ctype    (ch_type),
    .edges    (),
    .busy     (ch_busy),
    .finished (ch_fin)
  );

  text_fsm u_text (
    .clk, .rst,
    .start    (state == S_TEXT0),
    .addr     (tx_addr),
    .row_word (row_rdata),
    .col_word (col_rdata),
    .value    (tx_value),
    .mult     (tx_mult),
    .busy     (tx_busy),
    .finished (tx_fin)
  );

  always_comb begin
    if (mem_busy)     begin row_addr = mem_row_addr; col_addr = mem_col_addr; end
    else if (ch_busy) begin row_addr = ch_addr;      col_addr = ch_addr;      end
    else if (tx_busy) begin row_addr = tx_addr;      col_addr = tx_addr;      end
    else              begin row_addr = '0;           col_addr = '0;           end
  end

  sp_ram #(.WIDTH(64), .DEPTH(64)) u_row_ram (
    .clk, .we(row_we), .addr(row_addr), .wdata(row_wdata), .rdata(row_rdata));
  sp_ram #(.WIDTH(64), .DEPTH(64)) u_col_ram (
    .clk, .we(col_we), .addr(col_addr), .wdata(col_wdata), .rdata(col_rdata));
endmodule
