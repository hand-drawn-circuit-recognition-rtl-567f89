// video_ram: 8 x 60000 dual-port frame buffer for the 800x600 1-bit screen.
//
// Each byte is 8 horizontally adjacent pixels (bit 7 leftmost), 100 bytes
// per line, 1 = white. Port A is written by the display writers, port B
// is read continuously by the display manager; reads are registered (one
// cycle latency), and the two ports work independently, as the document
// describes. Written as an array so a synthesizer can map it to block RAM.
module video_ram #(
  parameter int DEPTH = 60000,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we_a,
  input  logic [AW-1:0] addr_a,
  input  logic [7:0]    wdata_a,
  input  logic [AW-1:0] addr_b,
  output logic [7:0]    rdata_b
);
  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_a && int'(addr_a) < DEPTH) mem[addr_a] <= wdata_a;
    rdata_b <= (int'(addr_b) < DEPTH) ? mem[addr_b] : 8'hFF;
  end
endmodule
