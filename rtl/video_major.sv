// video_major: the major FSM of the video write side. It decides from the
// mode switches which display writer is active and routes the shared
// memories to it.
//
// mode 0 = raw bitmap, 1 = ideal circuit, 2 = SPICE text, 3 = none. A
// writer's `active` is high while its mode is selected; the ideal and
// SPICE writers wait for recognition to finish. Changing the switches
// drops `active`, the writer returns to idle, and the new one starts. The
// FSM has an idle state and one state per mode; it passes through idle on
// every change so that the old writer sees `active` fall first.
// Routing: the video RAM write port goes to the writer of the current
// mode; the results RAM belongs to the recognizer until recog_done, then to
// the analysis module while it runs, otherwise to the active writer; the
// node value RAM belongs to the analysis module while it runs, otherwise
// to the active writer. The analysis start is the OR of the two writers'
// requests. The document gives the job of this FSM, not its states; this
// arrangement is this design's.
module video_major
  import hdcr_pkg::*;
#(
  localparam int AW = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [1:0]    mode,
  input  logic          recog_done,
  output logic          raw_active,
  output logic          ideal_active,
  output logic          spice_active,
  // video RAM write port
  input  logic          raw_we,   input logic [AW-1:0] raw_addr,   input logic [7:0] raw_wdata,
  input  logic          ideal_we, input logic [AW-1:0] ideal_addr, input logic [7:0] ideal_wdata,
  input  logic          spice_we, input logic [AW-1:0] spice_addr, input logic [7:0] spice_wdata,
  output logic          vram_we,
  output logic [AW-1:0] vram_addr,
  output logic [7:0]    vram_wdata,
  // results RAM
  input  logic          recog_we, input logic [5:0] recog_addr,
  input  logic [5:0]    an_res_addr, ideal_res_addr, spice_res_addr,
  output logic          res_we,
  output logic [5:0]    res_addr,
  // node value RAM
  input  logic          an_busy,
  input  logic          an_node_we, input logic [6:0] an_node_addr,
  input  logic [6:0]    ideal_node_addr, spice_node_addr,
  output logic          node_we,
  output logic [6:0]    node_addr,
  // analysis start requests
  input  logic          ideal_an_start, spice_an_start,
  output logic          an_start
);
  typedef enum logic [1:0] {S_IDLE, S_RAW, S_IDEAL, S_SPICE} state_t;
  state_t state;

  always_ff @(posedge clk) begin
    if (rst) state <= S_IDLE;
    else begin
      case (state)
        S_IDLE: begin
          if (mode == 2'd0) state <= S_RAW;
          else if (mode == 2'd1 && recog_done) state <= S_IDEAL;
          else if (mode == 2'd2 && recog_done) state <= S_SPICE;
        end
        S_RAW:   if (mode != 2'd0) state <= S_IDLE;
        S_IDEAL: if (mode != 2'd1) state <= S_IDLE;
        default: if (mode != 2'd2) state <= S_IDLE;
      endcase
    end
  end

  assign raw_active   = (state == S_RAW)   && (mode == 2'd0);
  assign ideal_active = (state == S_IDEAL) && (mode == 2'd1);
  assign spice_active = (state == S_SPICE) && (mode == 2'd2);

  always_comb begin
    case (state)
      S_RAW:   begin vram_we = raw_we;   vram_addr = raw_addr;   vram_wdata = raw_wdata;   end
      S_IDEAL: begin vram_we = ideal_we; vram_addr = ideal_addr; vram_wdata = ideal_wdata; end
      S_SPICE: begin vram_we = spice_we; vram_addr = spice_addr; vram_wdata = spice_wdata; end
      default: begin vram_we = 1'b0;     vram_addr = '0;         vram_wdata = 8'hFF;       end
    endcase

    if (!recog_done)             begin res_we = recog_we; res_addr = recog_addr; end
    else if (an_busy)            begin res_we = 1'b0;     res_addr = an_res_addr; end
    else if (state == S_IDEAL)   begin res_we = 1'b0;     res_addr = ideal_res_addr; end
    else                         begin res_we = 1'b0;     res_addr = spice_res_addr; end

    if (an_busy)                 begin node_we = an_node_we; node_addr = an_node_addr; end
    else if (state == S_IDEAL)   begin node_we = 1'b0;       node_addr = ideal_node_addr; end
    else                         begin node_we = 1'b0;       node_addr = spice_node_addr; end
  end

  assign an_start = ideal_an_start | spice_an_start;
endmodule
