// tb_display_manager: drives pixel counters and sync inputs directly,
// serves reads from a behavioural frame buffer with one cycle of latency,
// and checks the read address (column/8 + row*100), that the pixel shown
// is the bit of the previous column, the 8'hFF/0 colour mapping, the
// one-cycle delay of blank and composite sync (XNOR of the syncs), and the
// three-cycle delay of hsync and vsync.
`include "tb_common.svh"
module tb_display_manager;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [10:0] hcount = 0;
  logic [9:0]  vcount = 0;
  logic        hsync_in = 0, vsync_in = 0, blank_in = 0;
  logic [15:0] vram_addr;
  logic [7:0]  vram_data;
  logic [7:0]  red, green, blue;
  logic        blank_n, csync, hsync, vsync;

  display_manager dut (.*);

  logic [7:0] fb [60000];
  always_ff @(posedge clk) vram_data <= fb[vram_addr];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    logic [10:0] hq [$];
    logic [9:0]  vq [$];
    logic        bq [$], hsq [$], vsq [$];
    for (int i = 0; i < 60000; i++) fb[i] = 8'($urandom);
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      // address check for the current inputs
      `CHECK(int'(vram_addr) == int'(hcount) / 8 + int'(vcount) * 100, "read address")
      // the inputs still applied were sampled at the last edge: outputs of the
      // one-cycle path show them, the three-cycle syncs show those two cycles older
      if (hq.size() >= 3) begin
        logic pix;
        pix = fb[int'(hcount) / 8 + int'(vcount) * 100][7 - int'(hcount) % 8] & ~blank_in;
        `CHECK(red == {8{pix}} && green == {8{pix}} && blue == {8{pix}}, "pixel of previous column")
        `CHECK(blank_n == ~blank_in, "blank delayed one cycle")
        `CHECK(csync == ~(hsync_in ^ vsync_in), "composite sync is XNOR, delayed one cycle")
        `CHECK(hsync == hsq[1] && vsync == vsq[1], "hsync/vsync delayed three cycles")
      end
      hq.push_front(hcount); vq.push_front(vcount); bq.push_front(blank_in);
      hsq.push_front(hsync_in); vsq.push_front(vsync_in);
      if (hq.size() > 3) begin
        void'(hq.pop_back()); void'(vq.pop_back()); void'(bq.pop_back());
        void'(hsq.pop_back()); void'(vsq.pop_back());
      end
      // next inputs: walk a few lines with random syncs and blanking
      hcount   = (hcount == 11'd799) ? 11'd0 : hcount + 1'b1;
      if (hcount == 0) vcount = 10'($urandom_range(0, 599));
      hsync_in = ($urandom_range(0, 9) == 0);
      vsync_in = ($urandom_range(0, 9) == 0);
      blank_in = ($urandom_range(0, 7) == 0);
    end
    `TB_END
  end
endmodule
