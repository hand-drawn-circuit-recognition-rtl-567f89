// raw_display: copies the scanned 512x512 bitmap into the frame buffer,
// centred on the 800x600 screen.
//
// While `active` is high the FSM first clears the screen, writing 8'hFF
// (white) to every video RAM byte, then walks the 4096 image ROM words in
// order. Each 64-pixel word is split into eight 8-pixel bytes, selected by
// a 3-bit chunk counter, and written to video RAM at
//   (V_OFF + a/8)*100 + H_OFF + (a mod 8)*8 + chunk.
// Every video RAM write takes three cycles: address and data set, write
// enable high, address and data held with write enable low. Ink (1 in the
// ROM) is drawn black (0 in the frame buffer). When the image is done the
// FSM waits in its final state, with `done` high, until `active` falls,
// and then returns to idle. The sequence, three-cycle write and clearing
// follow the document; the offsets H_OFF = 18 bytes (144 pixels) and
// V_OFF = 44 lines are what centring 512 pixels in 800x600 gives.
module raw_display #(
  parameter int RAM_DEPTH = 60000,
  parameter int WORDS     = 4096,
  parameter int H_OFF     = 18,
  parameter int V_OFF     = 44,
  localparam int AW  = $clog2(RAM_DEPTH),
  localparam int RAW = $clog2(WORDS)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           active,
  output logic [RAW-1:0] rom_addr,
  input  logic [63:0]    rom_data,
  output logic           vram_we,
  output logic [AW-1:0]  vram_addr,
  output logic [7:0]     vram_wdata,
  output logic           done
);
  typedef enum logic [2:0] {S_IDLE, S_CLR1, S_CLR2, S_CLR3, S_READ, S_LATCH, S_W1, S_W2} state_t;
  typedef enum logic [1:0] {P_SET, P_WE, P_HOLD} phase_t;

  state_t         state;
  phase_t         phase;
  logic [AW-1:0]  clr_addr;
  logic [RAW-1:0] word;
  logic [2:0]     chunk;
  logic [63:0]    data_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      phase    <= P_SET;
      clr_addr <= '0;
      word     <= '0;
      chunk    <= '0;
    end else begin
      case (state)
        S_IDLE: if (active) begin
          state    <= S_CLR1;
          clr_addr <= '0;
          word     <= '0;
            end
        S_CLR1: state <= S_CLR2;
        S_CLR2: state <= S_CLR3;
        S_CLR3: begin
          if (int'(clr_addr) == RAM_DEPTH - 1) state <= S_READ;
          else begin
            clr_addr <= clr_addr + 1'b1;
            state    <= S_CLR1;
          end
        end
        S_READ:  state <= S_LATCH;            // ROM read latency
        S_LATCH: begin
          data_q <= rom_data;
          chunk  <= '0;
          phase  <= P_SET;
          state  <= S_W1;
        end
        S_W1: begin
          case (phase)
            P_SET:  phase <= P_WE;
            P_WE:   phase <= P_HOLD;
            default: begin
              phase <= P_SET;
              if (chunk == 3'd7) begin
                if (int'(word) == WORDS - 1) state <= S_W2;
                else begin
                  word  <= word + 1'b1;
                  state <= S_READ;
                end
              end else chunk <= chunk + 1'b1;
            end
          endcase
        end
        S_W2: begin                           // termination state
          if (!active) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  logic [AW-1:0] copy_addr;
  assign copy_addr = AW'((V_OFF + int'(word) / 8) * 100 + H_OFF + (int'(word) % 8) * 8 + int'(chunk));

  always_comb begin
    rom_addr   = word;
    vram_we    = 1'b0;
    vram_addr  = clr_addr;
    vram_wdata = 8'hFF;
    if (state == S_CLR2) vram_we = 1'b1;
    if (state == S_W1) begin
      vram_addr  = copy_addr;
      vram_wdata = ~data_q[63 - 8*int'(chunk) -: 8];
      vram_we    = (phase == P_WE);
    end
  end

  assign done = (state == S_W2);
endmodule
