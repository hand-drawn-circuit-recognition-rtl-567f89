// stack: first-in last-out store of 7-bit words over a 7 x 64 RAM, the
// working memory of the depth-first search in the analysis module.
//
// After reset the stack writes the start-of-stack symbol (STACK_SOS) to
// RAM address 0 and waits. A user issues a command on cmd and holds it,
// with its data, for three cycles:
//   cmd = 2 (push): cycle 1 the address is incremented, cycle 2 the RAM
//                   write enable is high, cycle 3 the data is held.
//   cmd = 3 (pop):  the address already points at the newest item, so the
//                   registered RAM output is driven at once; pop_valid is
//                   high and pop_data holds the item for two cycles while
//                   the address is decremented. Popping the start-of-stack
//                   symbol returns it and leaves the address at 0, which
//                   is how a user sees that the stack is empty.
// Popped values are not erased. This follows the document; where it uses
// one bidirectional 7-bit bus that the stack drives only while popping,
// this design has separate push_data and pop_data buses and a pop_valid
// flag marking when the stack would drive the bus (on-chip tristates are
// not available). busy is this design's addition: it is high while a
// command is being carried out, so a user can wait for it instead of
// counting cycles.
module stack
  import hdcr_pkg::*;
#(
  parameter int DEPTH = 64
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] cmd,
  input  logic [6:0] push_data,
  output logic [6:0] pop_data,
  output logic       pop_valid,
  output logic       busy
);
  localparam int AW = $clog2(DEPTH);
  localparam logic [1:0] CMD_PUSH = 2'd2, CMD_POP = 2'd3;

  typedef enum logic [2:0] {S_INIT, S_IDLE, S_PUSH1, S_PUSH2, S_PUSH3, S_POP1, S_POP2} state_t;
  state_t state;

  logic [6:0]    mem [DEPTH];
  logic [AW-1:0] addr;
  logic [6:0]    q;
  logic          we;
  logic [6:0]    wdata;

  assign we    = (state == S_INIT) || (state == S_PUSH2);
  assign wdata = (state == S_INIT) ? STACK_SOS : push_data;

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    q <= mem[addr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_INIT;
      addr  <= '0;
    end else begin
      case (state)
        S_INIT:  state <= S_IDLE;
        S_IDLE:  if (cmd == CMD_PUSH) begin
                   state <= S_PUSH1;
                 end else if (cmd == CMD_POP) begin
                   state <= S_POP1;
                 end
        S_PUSH1: begin addr <= addr + 1'b1; state <= S_PUSH2; end
        S_PUSH2: state <= S_PUSH3;
        S_PUSH3: state <= S_IDLE;
        S_POP1:  state <= S_POP2;
        S_POP2:  begin
                   if (q != STACK_SOS) addr <= addr - 1'b1;
                   state <= S_IDLE;
                 end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign pop_valid = (state == S_POP1) || (state == S_POP2);
  assign pop_data  = q;
  assign busy      = (state != S_IDLE);
endmodule
