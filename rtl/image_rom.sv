// image_rom: the scanned 512x512 circuit bitmap, 4096 words of 64 pixels.
//
// Word a holds the 64 pixels of image line a/8 starting at column
// (a mod 8)*64; bit 63 is the leftmost pixel, 1 means ink. So consecutive
// addresses walk along a line, not down a grid block. Two synchronous read
// ports serve the recognizer and the raw-display writer, each returning the
// word one cycle after the address. On the FPGA the contents come from the
// bitstream; here a load port (load_we, load_addr, load_data) writes them
// before recognition starts, which is this design's replacement for
// building the ROM from a file.
module image_rom #(
  parameter int WORDS = 4096,
  localparam int AW = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  logic [63:0]   load_data,
  input  logic [AW-1:0] addr_a,
  output logic [63:0]   data_a,
  input  logic [AW-1:0] addr_b,
  output logic [63:0]   data_b
);
  logic [63:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
    data_a <= mem[addr_a];
    data_b <= mem[addr_b];
  end
endmodule
