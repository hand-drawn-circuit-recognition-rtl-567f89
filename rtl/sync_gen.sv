// sync_gen: VGA timing for 800x600 at 72 Hz with a 50 MHz pixel clock.
//
// A four-state FSM walks each line through active video, front porch,
// sync pulse and back porch (800/56/120/64 pixels, 1040 per line); a 2-bit
// line-mode register walks the frame through the same four regions
// (600/37/6/23 lines, 666 per frame). The line counter advances each time
// the horizontal FSM enters active video, and the line mode changes when
// the counter reaches the end of the current region. Outputs, all
// registered and valid in the same cycle:
//   hcount  pixel column within the line (0..1039, 0..799 visible)
//   vcount  line within the frame (0..665, 0..599 visible)
//   hsync, vsync  high during the sync pulses
//   blank   high outside the visible 800x600 area
// The timing numbers are the document's; the sync polarity (active high,
// as the VESA mode defines it) is this design's reading.
module sync_gen #(
  parameter int H_ACTIVE = 800,
  parameter int H_FP     = 56,
  parameter int H_SYNC   = 120,
  parameter int H_BP     = 64,
  parameter int V_ACTIVE = 600,
  parameter int V_FP     = 37,
  parameter int V_SYNC   = 6,
  parameter int V_BP     = 23
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);
  typedef enum logic [1:0] {R_ACTIVE, R_FP, R_SYNC, R_BP} region_t;

  region_t hstate, vmode;
  logic    line_end;

  localparam int H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  assign line_end = (int'(hcount) == H_TOTAL - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      hstate <= R_ACTIVE;
      hcount <= '0;
    end else begin
      hcount <= line_end ? '0 : hcount + 1'b1;
      case (hstate)
        R_ACTIVE: if (int'(hcount) == H_ACTIVE - 1)                   hstate <= R_FP;
        R_FP:     if (int'(hcount) == H_ACTIVE + H_FP - 1)            hstate <= R_SYNC;
        R_SYNC:   if (int'(hcount) == H_ACTIVE + H_FP + H_SYNC - 1)   hstate <= R_BP;
        default:  if (line_end)                                       hstate <= R_ACTIVE;
      endcase
    end
  end

  // Line counter and line mode: updated when the FSM enters active video.
  always_ff @(posedge clk) begin
    if (rst) begin
      vmode  <= R_ACTIVE;
      vcount <= '0;
    end else if (line_end) begin
      vcount <= (int'(vcount) == V_TOTAL - 1) ? '0 : vcount + 1'b1;
      case (vmode)
        R_ACTIVE: if (int'(vcount) == V_ACTIVE - 1)                   vmode <= R_FP;
        R_FP:     if (int'(vcount) == V_ACTIVE + V_FP - 1)            vmode <= R_SYNC;
        R_SYNC:   if (int'(vcount) == V_ACTIVE + V_FP + V_SYNC - 1)   vmode <= R_BP;
        default:  if (int'(vcount) == V_TOTAL - 1)                    vmode <= R_ACTIVE;
      endcase
    end
  end

  assign hsync = (hstate == R_SYNC);
  assign vsync = (vmode == R_SYNC);
  assign blank = (hstate != R_ACTIVE) || (vmode != R_ACTIVE);
endmodule
