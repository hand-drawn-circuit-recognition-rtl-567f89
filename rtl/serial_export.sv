// serial_export: sends the SPICE text to a PC over RS-232.
//
// On a `start` pulse, and once the spice RAM holds a complete netlist
// (text_ready), it reads the spice RAM from address 0 and transmits each
// character on `tx` as one 8N1 UART frame (start bit 0, eight data bits
// LSB first, stop bit 1), until it reads the end-of-file code, which is not
// sent. The line idles high. The document names this module and its job;
// the 8N1 framing and the bit time CLKS_PER_BIT (50 MHz / 9600 baud by
// default) are this design's choices. A character takes 10*CLKS_PER_BIT
// cycles plus two for the RAM read; `busy` is high while sending.
module serial_export #(
  parameter int CLKS_PER_BIT = 5208,
  parameter int TW           = 11
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic          text_ready,
  output logic [TW-1:0] ser_addr,
  input  logic [7:0]    ser_data,
  output logic          tx,
  output logic          busy
);
  localparam logic [7:0] CH_EOF = 8'h04;
  typedef enum logic [2:0] {S_IDLE, S_RD, S_GET, S_SEND} state_t;

  state_t     state;
  logic [9:0] frame;
  logic [3:0] nbit;
  logic [$clog2(CLKS_PER_BIT+1)-1:0] tick;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      ser_addr <= '0;
      frame    <= '1;
      nbit     <= '0;
      tick     <= '0;
    end else begin
      case (state)
        S_IDLE: if (start && text_ready) begin
          ser_addr <= '0;
          state    <= S_RD;
        end
        S_RD:  state <= S_GET;
        S_GET: begin
          if (ser_data == CH_EOF) state <= S_IDLE;
          else begin
            frame <= {1'b1, ser_data, 1'b0};
            nbit  <= '0;
            tick  <= '0;
            state <= S_SEND;
          end
        end
        S_SEND: begin
          if (int'(tick) == CLKS_PER_BIT - 1) begin
            tick  <= '0;
            frame <= {1'b1, frame[9:1]};
            nbit  <= nbit + 1'b1;
            if (nbit == 4'd9) begin
              ser_addr <= ser_addr + 1'b1;
              state    <= S_RD;
            end
          end else tick <= tick + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign tx   = (state == S_SEND) ? frame[0] : 1'b1;
  assign busy = (state != S_IDLE);
endmodule
