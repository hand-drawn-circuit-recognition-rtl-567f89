// tb_raw_display: fills a behavioural frame buffer with junk, loads a test
// image into a behavioural image ROM, raises `active` and checks that every
// frame-buffer byte ends up white except the centred 512x512 window, which
// must equal the inverted bitmap (ink black); also that each write keeps
// address and data stable for three cycles with write enable only in the
// middle one, that the module waits in its final state while active, and
// that it returns to idle when active falls.
`include "tb_common.svh"
module tb_raw_display;
  import tb_img_pkg::*;
  import hdcr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        active = 0;
  logic [11:0] rom_addr;
  logic [63:0] rom_data;
  logic        vram_we;
  logic [15:0] vram_addr;
  logic [7:0]  vram_wdata;
  logic        done;

  raw_display dut (.*);

  logic [63:0] rom [4096];
  logic [7:0]  fb  [60000];
  always_ff @(posedge clk) begin
    rom_data <= rom[rom_addr];
    if (vram_we) fb[vram_addr] <= vram_wdata;
  end

  // write protocol: address/data stable in the cycles around the enable
  logic [15:0] pa = 0; logic [7:0] pd = 0; logic pwe = 0; int bad_proto = 0, writes = 0;
  always @(negedge clk) begin
    if (pwe && !vram_we) if (vram_addr != pa || vram_wdata != pd) bad_proto++;
    if (vram_we && !pwe) writes++;
    if (vram_we && pwe) bad_proto++;
    pa = vram_addr; pd = vram_wdata; pwe = vram_we;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    int cyc, bad;
    clear(); grid();
    draw_comp(0, 0, T_RES_H); draw_comp(3, 5, T_GND); draw_comp(7, 7, T_NPN_L);
    draw_char(3, 5, 38, 46, digit_segs(7));
    for (int a = 0; a < 4096; a++) rom[a] = rom_word(a);
    for (int i = 0; i < 60000; i++) fb[i] = 8'($urandom);
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk); active = 1;
    cyc = 0;
    while (!done && cyc < 900000) begin @(negedge clk); cyc++; end
    `CHECK(done, "raw display finishes")
    `CHECK(cyc == 60000 * 3 + 4096 * (2 + 8 * 3) + 1, $sformatf("cycle count %0d", cyc))
    `CHECK(writes == 60000 + 4096 * 8, $sformatf("write count %0d", writes))
    `CHECK(bad_proto == 0, "three-cycle write protocol")
    bad = 0;
    for (int y = 0; y < 600; y++)
      for (int xb = 0; xb < 100; xb++) begin
        logic [7:0] want;
        want = 8'hFF;
        if (y >= 44 && y < 556 && xb >= 18 && xb < 82)
          for (int k = 0; k < 8; k++) want[7 - k] = ~img[y - 44][(xb - 18) * 8 + k];
        if (fb[y * 100 + xb] != want) bad++;
      end
    `CHECK(bad == 0, $sformatf("frame buffer matches centred bitmap (%0d bad bytes)", bad))
    repeat (20) @(negedge clk);
    `CHECK(done, "waits in the final state while active")
    active = 0;
    repeat (3) @(negedge clk);
    `CHECK(!done, "returns to idle when active falls")
    `TB_END
  end
endmodule
