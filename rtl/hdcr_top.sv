// hdcr_top: hand-drawn circuit recognizer, from scanned bitmap to screen
// and SPICE text.
//
// A 512x512 1-bit scan of a circuit drawn on an 8x8 grid sits in the image
// ROM (loaded through the img_load_* port). After reset the recognition
// stage classifies every grid block (component type, value digit,
// multiplier) into the results RAM and raises recog_done. The video side
// runs from the same clock, which is the 50 MHz pixel clock: the sync
// generator and display manager continuously show the frame buffer on an
// 800x600, 72 Hz screen, and one of three writers fills it, chosen by
// `mode` (0 raw scan, 1 redrawn circuit with values and node labels,
// 2 SPICE netlist text, 3 none). The redrawn-circuit and SPICE writers
// first run the node analysis (depth-first search over the grid with a
// hardware stack) into the node value RAM. A `send` pulse, once the SPICE
// text exists, sends it over the serial line `uart_tx`. VGA outputs go to
// an ADV7125-style DAC (24-bit colour, blank_n, composite sync) and hsync/
// vsync straight to the monitor. The partitioning follows the document;
// the single clock and reset are this design's simplification (the
// document derives the pixel clock with a DCM).
module hdcr_top
  import hdcr_pkg::*;
#(
  parameter int CLKS_PER_BIT = 5208
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        img_load_we,
  input  logic [11:0] img_load_addr,
  input  logic [63:0] img_load_data,
  input  logic [1:0]  mode,
  input  logic        send,
  output logic        recog_done,
  output logic [7:0]  vga_r,
  output logic [7:0]  vga_g,
  output logic [7:0]  vga_b,
  output logic        vga_blank_n,
  output logic        vga_csync,
  output logic        vga_hsync,
  output logic        vga_vsync,
  output logic        uart_tx
);
  localparam int AW = 16;

  // ---- image ROM and recognition ---------------------------------------------
  logic [11:0] rec_rom_addr, raw_rom_addr;
  logic [63:0] rec_rom_data, raw_rom_data;

  image_rom u_image (
    .clk,
    .load_we   (img_load_we),
    .load_addr (img_load_addr),
    .load_data (img_load_data),
    .addr_a    (rec_rom_addr),
    .data_a    (rec_rom_data),
    .addr_b    (raw_rom_addr),
    .data_b    (raw_rom_data)
  );

  logic       rec_we;
  logic [5:0] rec_addr;
  result_t    rec_wdata;

  recog_fsm u_recog (
    .clk, .rst,
    .rom_addr  (rec_rom_addr),
    .rom_data  (rec_rom_data),
    .res_we    (rec_we),
    .res_addr  (rec_addr),
    .res_wdata (rec_wdata),
    .block     (),
    .finished  (recog_done)
  );

  // ---- shared results RAM and node value RAM ---------------------------------
  logic       res_we;
  logic [5:0] res_addr;
  result_t    res_rdata;
  sp_ram #(.WIDTH($bits(result_t)), .DEPTH(NBLOCKS)) u_results (
    .clk, .we(res_we), .addr(res_addr), .wdata(rec_wdata), .rdata(res_rdata));

  logic       node_we;
  logic [6:0] node_addr, node_wdata, node_rdata;
  sp_ram #(.WIDTH(7), .DEPTH(NNODES)) u_nodes (
    .clk, .we(node_we), .addr(node_addr), .wdata(node_wdata), .rdata(node_rdata));

  // ---- node analysis ---------------------------------------------------------
  logic       an_start, an_busy, an_done, an_node_we;
  logic [5:0] an_res_addr;
  logic [6:0] an_node_addr;

  analysis u_analysis (
    .clk, .rst,
    .start      (an_start),
    .res_addr   (an_res_addr),
    .res_rdata,
    .node_we    (an_node_we),
    .node_addr  (an_node_addr),
    .node_wdata,
    .node_rdata,
    .busy       (an_busy),
    .finished   (an_done),
    .n_popped   (),
    .n_merges   ()
  );

  // ---- display writers -------------------------------------------------------
  logic          raw_active, ideal_active, spice_active;
  logic          raw_we, ideal_we, spice_we, vram_we;
  logic [AW-1:0] raw_addr, ideal_addr, spice_addr, vram_waddr;
  logic [7:0]    raw_wdata, ideal_wdata, spice_wdata, vram_wdata;
  logic [5:0]    ideal_res_addr, spice_res_addr;
  logic [6:0]    ideal_node_addr, spice_node_addr;
  logic          ideal_an_start, spice_an_start;
  logic [10:0]   ser_addr;
  logic [7:0]    ser_data;
  logic          text_ready;

  raw_display u_raw (
    .clk, .rst,
    .active     (raw_active),
    .rom_addr   (raw_rom_addr),
    .rom_data   (raw_rom_data),
    .vram_we    (raw_we),
    .vram_addr  (raw_addr),
    .vram_wdata (raw_wdata),
    .done       ()
  );

  ideal_display u_ideal (
    .clk, .rst,
    .active     (ideal_active),
    .an_start   (ideal_an_start),
    .an_done,
    .res_addr   (ideal_res_addr),
    .res_rdata,
    .node_addr  (ideal_node_addr),
    .node_rdata,
    .vram_we    (ideal_we),
    .vram_addr  (ideal_addr),
    .vram_wdata (ideal_wdata),
    .done       ()
  );

  spice_display u_spice (
    .clk, .rst,
    .active     (spice_active),
    .an_start   (spice_an_start),
    .an_done,
    .res_addr   (spice_res_addr),
    .res_rdata,
    .node_addr  (spice_node_addr),
    .node_rdata,
    .vram_we    (spice_we),
    .vram_addr  (spice_addr),
    .vram_wdata (spice_wdata),
    .ser_addr,
    .ser_data,
    .text_ready,
    .done       ()
  );

  serial_export #(.CLKS_PER_BIT(CLKS_PER_BIT), .TW(11)) u_serial (
    .clk, .rst,
    .start      (send),
    .text_ready,
    .ser_addr,
    .ser_data,
    .tx         (uart_tx),
    .busy       ()
  );

  video_major u_major (
    .clk, .rst,
    .mode, .recog_done,
    .raw_active, .ideal_active, .spice_active,
    .raw_we, .raw_addr, .raw_wdata,
    .ideal_we, .ideal_addr, .ideal_wdata,
    .spice_we, .spice_addr, .spice_wdata,
    .vram_we, .vram_addr(vram_waddr), .vram_wdata,
    .recog_we(rec_we), .recog_addr(rec_addr),
    .an_res_addr, .ideal_res_addr, .spice_res_addr,
    .res_we, .res_addr,
    .an_busy, .an_node_we, .an_node_addr,
    .ideal_node_addr, .spice_node_addr,
    .node_we, .node_addr,
    .ideal_an_start, .spice_an_start,
    .an_start
  );

  // ---- video read side -------------------------------------------------------
  logic [10:0]   hcount;
  logic [9:0]    vcount;
  logic          hs, vs, blank;
  logic [AW-1:0] vram_raddr;
  logic [7:0]    vram_rdata;

  video_ram u_vram (
    .clk,
    .we_a    (vram_we),
    .addr_a  (vram_waddr),
    .wdata_a (vram_wdata),
    .addr_b  (vram_raddr),
    .rdata_b (vram_rdata)
  );

  sync_gen u_sync (
    .clk, .rst, .hcount, .vcount, .hsync(hs), .vsync(vs), .blank);

  display_manager u_disp (
    .clk,
    .hcount, .vcount,
    .hsync_in  (hs),
    .vsync_in  (vs),
    .blank_in  (blank),
    .vram_addr (vram_raddr),
    .vram_data (vram_rdata),
    .red       (vga_r),
    .green     (vga_g),
    .blue      (vga_b),
    .blank_n   (vga_blank_n),
    .csync     (vga_csync),
    .hsync     (vga_hsync),
    .vsync     (vga_vsync)
  );
endmodule
