// tb_sync_gen: runs the 800x600 at 72 Hz timing for a little over one
// frame and measures it: 1040 clocks per line, hsync 120 clocks starting
// 856 clocks into the line, 666 lines per frame, vsync 6 lines starting
// at line 637, and exactly 800x600 unblanked pixels per frame.
`include "tb_common.svh"
module tb_sync_gen;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hsync, vsync, blank;

  sync_gen dut (.*);

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    int t, hs_rise, hs_len, last_rise, vis, vs_lines, vs_first, lines;
    logic hs_d, vs_d;
    repeat (2) @(negedge clk);
    rst = 0;
    hs_d = 0; vs_d = 0; hs_rise = -1; last_rise = -1; vis = 0; vs_lines = 0; vs_first = -1;
    hs_len = 0; lines = 0;
    for (t = 0; t < 1040 * 666; t++) begin
      @(negedge clk);
      if (!blank) vis++;
      if (hsync) hs_len++;
      if (hsync && !hs_d) begin
        if (last_rise >= 0) `CHECK(t - last_rise == 1040, "line period 1040 clocks")
        if (lines == 0) `CHECK(hcount == 11'd856, "hsync starts 856 clocks into the line")
        last_rise = t;
        lines++;
      end
      if (!hsync && hs_d && lines == 1) `CHECK(hs_len == 120, "hsync 120 clocks")
      if (vsync && !vs_d) vs_first = vcount;
      if (vsync && hcount == 0) vs_lines++;
      hs_d = hsync; vs_d = vsync;
    end
    `CHECK(lines == 666, $sformatf("666 lines per frame (got %0d)", lines))
    `CHECK(vis == 800 * 600, $sformatf("800x600 visible pixels (got %0d)", vis))
    `CHECK(vs_lines == 6, $sformatf("vsync 6 lines (got %0d)", vs_lines))
    `CHECK(vs_first == 637, $sformatf("vsync starts at line 637 (got %0d)", vs_first))
    `CHECK(hcount == 0 && vcount == 0, "frame wraps to the origin")
    `TB_END
  end
endmodule
