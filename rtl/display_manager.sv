// display_manager: turns the frame buffer into the signals for the video
// DAC and the monitor.
//
// The video RAM read address is (hcount div 8) + vcount*100, formed
// combinationally from the sync generator's counters. The RAM answers one
// cycle later, so the pixel bit chosen from the returned byte is that of
// the previous column (the column is delayed one cycle to select the bit),
// and blank is delayed one cycle to match. The DAC takes 24-bit colour:
// each 8-bit channel is 8'hFF for a white pixel and 0 for black or blank.
// The composite sync (csync) is the XNOR of hsync and vsync and, since it passes
// through the DAC, is delayed one cycle like the pixels; hsync and vsync
// go straight to the monitor, so they are delayed three cycles (one for
// the RAM, two for the DAC pipeline). All of this follows the document;
// that blanked pixels are forced to black is this design's choice.
module display_manager #(
  parameter int BYTES_PER_LINE = 100,
  parameter int RAM_DEPTH      = 60000,
  localparam int AW = $clog2(RAM_DEPTH)
) (
  input  logic          clk,
  input  logic [10:0]   hcount,
  input  logic [9:0]    vcount,
  input  logic          hsync_in,
  input  logic          vsync_in,
  input  logic          blank_in,
  output logic [AW-1:0] vram_addr,
  input  logic [7:0]    vram_data,
  output logic [7:0]    red,
  output logic [7:0]    green,
  output logic [7:0]    blue,
  output logic          blank_n,
  output logic          csync,
  output logic          hsync,
  output logic          vsync
);
  logic [2:0] bit_d1;
  logic       blank_d1, csync_d1;
  logic [2:0] hs_d, vs_d;
  logic       pix;

  assign vram_addr = AW'(int'(hcount) / 8 + int'(vcount) * BYTES_PER_LINE);

  always_ff @(posedge clk) begin
    bit_d1   <= hcount[2:0];
    blank_d1 <= blank_in;
    csync_d1 <= ~(hsync_in ^ vsync_in);
    hs_d     <= {hs_d[1:0], hsync_in};
    vs_d     <= {vs_d[1:0], vsync_in};
  end

  assign pix     = vram_data[3'd7 - bit_d1] & ~blank_d1;
  assign red     = {8{pix}};
  assign green   = {8{pix}};
  assign blue    = {8{pix}};
  assign blank_n = ~blank_d1;
  assign csync = csync_d1;
  assign hsync   = hs_d[2];
  assign vsync   = vs_d[2];
endmodule
