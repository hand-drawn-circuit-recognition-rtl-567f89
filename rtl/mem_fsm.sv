// mem_fsm: memory-handling minor FSM of the recognizer. Copies one 64x64
// grid block out of the image ROM into a row RAM and a column RAM.
//
// The image ROM stores lines, not blocks: word (line*8 + block_col) holds
// 64 pixels of one line. For block b (row b/8, column b mod 8) the FSM
// reads line b/8*64 + r for r = 0..63 (state DELAY0 waits for the ROM,
// WRITE_ROW writes the row RAM and advances the row address), storing each
// row with bit i = pixel in column i. It then builds the columns with a
// single 64-bit shift register: for each column c it makes one pass over
// the row RAM (DELAY1 waits for the RAM, LOAD_REG shifts in bit c of the
// row) and WRITE_COL stores the register, bit r = pixel in row r. This
// trades time (about 8,400 cycles per block) for area, as the document
// chooses. `finished` is high for one cycle in DONE, after which the FSM is
// idle again. Interface: start pulse with `block` valid; ROM and RAM ports
// with one-cycle registered reads.
module mem_fsm (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [5:0]  block,
  output logic [11:0] rom_addr,
  input  logic [63:0] rom_data,
  output logic        row_we,
  output logic [5:0]  row_addr,
  output logic [63:0] row_wdata,
  input  logic [63:0] row_rdata,
  output logic        col_we,
  output logic [5:0]  col_addr,
  output logic [63:0] col_wdata,
  output logic        busy,
  output logic        finished
);
  typedef enum logic [2:0] {S_IDLE, S_DELAY0, S_WRITE_ROW, S_DELAY1, S_LOAD_REG,
                            S_WRITE_COL, S_DONE} state_t;
  state_t      state;
  logic [5:0]  blk;
  logic [5:0]  r;      // row being copied, then row being scanned
  logic [5:0]  c;      // column being assembled
  logic [63:0] sh;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      r     <= '0;
      c     <= '0;
      blk   <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          blk   <= block;
          r     <= '0;
          c     <= '0;
          state <= S_DELAY0;
        end
        S_DELAY0:    state <= S_WRITE_ROW;
        S_WRITE_ROW: begin
          r     <= r + 1'b1;
          state <= (r == 6'd63) ? S_DELAY1 : S_DELAY0;
        end
        S_DELAY1:    state <= S_LOAD_REG;
        S_LOAD_REG: begin
          sh    <= {row_rdata[c], sh[63:1]};
          r     <= r + 1'b1;
          state <= (r == 6'd63) ? S_WRITE_COL : S_DELAY1;
        end
        S_WRITE_COL: begin
          c     <= c + 1'b1;
          state <= (c == 6'd63) ? S_DONE : S_DELAY1;
        end
        default: state <= S_IDLE;     // S_DONE
      endcase
    end
  end

  assign rom_addr  = {blk[5:3], r, blk[2:0]};   // (blockrow*64 + r)*8 + blockcol
  assign row_we    = (state == S_WRITE_ROW);
  assign row_addr  = r;
  assign row_wdata = {<<{rom_data}};            // bit i = pixel i from the left
  assign col_we    = (state == S_WRITE_COL);
  assign col_addr  = c;
  assign col_wdata = sh;
  assign busy      = (state != S_IDLE);
  assign finished  = (state == S_DONE);
endmodule
