// sp_ram: single-port synchronous RAM, one read/write port.
//
// Used for the row RAM and column RAM (64 x 64 bits) that hold one grid
// block, the results RAM (64 x 20 bits), the node value RAM (112 x 7 bits)
// and the spice text RAM. A write stores wdata at addr on the rising edge
// when we is high; the read data is registered, so rdata shows the word
// at the address presented one cycle earlier (the recognizer FSMs insert a
// "delay" state for exactly this latency). Read-during-write returns the
// old word. The memories are plain arrays; their sizes follow the
// document, the single-port organisation is this design's choice.
module sp_ram #(
  parameter int WIDTH = 64,
  parameter int DEPTH = 64,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && int'(addr) < DEPTH) mem[addr] <= wdata;
    rdata <= (int'(addr) < DEPTH) ? mem[addr] : '0;
  end
endmodule
