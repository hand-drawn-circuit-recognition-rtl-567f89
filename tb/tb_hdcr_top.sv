// tb_hdcr_top: end-to-end test of the whole recognizer at its default
// parameters (9600-baud serial line, full 512x512 sheet, 800x600 video).
// A two-loop circuit is drawn on grid paper in the testbench (source,
// three resistors, two capacitors, two grounds, a cross, tees, corners and
// wires; every component with a value digit and a multiplier letter),
// loaded through the image load port while reset is held, and then:
//   1. recognition: every block's result word must match the drawing;
//   2. mode 0: the raw writer must copy the scan, inverted, into the frame
//      buffer at the centring offsets;
//   3. mode 1: the redrawn circuit triggers the node analysis; ground slots
//      must read 0 and the component nets must get distinct labels; the
//      depth-first search must visit every block and merge labels at
//      least once;
//   4. mode 2: the SPICE writer must produce one 22-byte line per
//      component, then EOT; a `send` pulse must put exactly those bytes
//      on uart_tx (decoded here at the 8N1 bit time);
//   5. all along, the VGA outputs must keep a 1040 x 666 frame (hsync
//      every 1040 cycles, vsync every 692,640).
// Each mechanism seen is counted and printed as an INFO line.
`include "tb_common.svh"
module tb_hdcr_top;
  import tb_img_pkg::*;
  import hdcr_pkg::*;
  localparam int CPB = 5208;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;                      // 50 MHz
  int checks = 0, failures = 0;

  logic        img_load_we = 0;
  logic [11:0] img_load_addr = '0;
  logic [63:0] img_load_data = '0;
  logic [1:0]  mode = 2'd3;
  logic        send = 0;
  logic        recog_done;
  logic [7:0]  vga_r, vga_g, vga_b;
  logic        vga_blank_n, vga_csync, vga_hsync, vga_vsync, uart_tx;

  hdcr_top dut (.*);

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  // ---- VGA timing monitor ----
  longint cyc = 0, last_hs = -1, last_vs = -1;
  int     n_hs = 0, n_vs = 0, bad_hs = 0, bad_vs = 0;
  logic   hs_q = 0, vs_q = 0;
  always @(posedge clk) begin
    cyc++;
    hs_q <= vga_hsync;
    vs_q <= vga_vsync;
    if (!rst && vga_hsync && !hs_q) begin
      if (last_hs >= 0 && cyc - last_hs != 1040) bad_hs++;
      last_hs = cyc; n_hs++;
    end
    if (!rst && vga_vsync && !vs_q) begin
      if (last_vs >= 0 && cyc - last_vs != 692640) bad_vs++;
      last_vs = cyc; n_vs++;
    end
  end

  // ---- UART receiver ----
  logic [7:0] rx [$];
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge uart_tx);
      if (rst) continue;
      repeat (CPB / 2) @(posedge clk);
      if (uart_tx) continue;                  // glitch, not a start bit
      for (int k = 0; k < 8; k++) begin
        repeat (CPB) @(posedge clk);
        b[k] = uart_tx;
      end
      repeat (CPB) @(posedge clk);
      if (!uart_tx) $display("FAIL: missing stop bit");
      rx.push_back(b);
    end
  end

  comp_t lay [64];
  function automatic void put(int r, int c, comp_t t);
    lay[r * 8 + c] = t;
  endfunction

  initial begin
    int n_blocks, n_parts, n_bad, n_ink, n_lines, n_eot;
    result_t w;
    for (int b = 0; b < 64; b++) lay[b] = T_BLANK;
    put(1, 1, T_CONN_BR); put(1, 2, T_RES_H); put(1, 3, T_TEE_LBR); put(1, 4, T_RES_H);
    put(1, 5, T_CONN_BL);
    put(2, 1, T_SRC_V);   put(2, 3, T_CAP_V); put(2, 5, T_RES_V);
    put(3, 1, T_CONN_TR); put(3, 2, T_TEE_LBR); put(3, 3, T_CROSS); put(3, 4, T_WIRE_H);
    put(3, 5, T_CONN_TL);
    put(4, 2, T_GND);     put(4, 3, T_CAP_V);
    put(5, 3, T_GND);
    clear(); grid();
    n_parts = 0;
    n_blocks = 0;
    for (int b = 0; b < 64; b++) if (lay[b] != T_BLANK) begin
      n_blocks++;
      draw_comp(b / 8, b % 8, lay[b]);
      if (is_netlist_part(lay[b])) begin
        draw_char(b / 8, b % 8, 38, 46, digit_segs(b % 10));
        draw_char(b / 8, b % 8, 48, 46, mult_segs(b % 7));
        n_parts++;
      end
    end
    // load the scan with reset held
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk);
      img_load_we = 1; img_load_addr = 12'(a); img_load_data = rom_word(a);
    end
    @(negedge clk); img_load_we = 0;
    repeat (3) @(negedge clk);
    rst = 0;

    // 1. recognition
    wait (recog_done);
    $display("INFO: recognition finished at cycle %0d", cyc);
    n_bad = 0;
    for (int b = 0; b < 64; b++) begin
      w = dut.u_results.mem[b];
      if (w.ctype != lay[b]) n_bad++;
      if (is_netlist_part(lay[b]) && (w.value != {8'hFF, 4'(b % 10)} || w.mult != 3'(b % 7)))
        n_bad++;
    end
    `CHECK(n_bad == 0, $sformatf("%0d result words differ from the drawing", n_bad))

    // 2. raw scan
    @(negedge clk); mode = 2'd0;
    wait (dut.u_raw.done);
    n_bad = 0;
    for (int a = 0; a < 4096; a++)
      for (int ch = 0; ch < 8; ch++) begin
        logic [63:0] rw;
        rw = rom_word(a);
        if (dut.u_vram.mem[(44 + a / 8) * 100 + 18 + (a % 8) * 8 + ch] != ~rw[63 - 8 * ch -: 8])
          n_bad++;
      end
    `CHECK(n_bad == 0, $sformatf("raw mode: %0d frame-buffer bytes wrong", n_bad))
    $display("INFO: raw mode drew the scan, done at cycle %0d", cyc);

    // 3. ideal circuit
    @(negedge clk); mode = 2'd1;
    wait (dut.u_ideal.done);
    begin
      logic [6:0] gnd_a, gnd_b, top_net, mid_net, right_net;
      gnd_a     = dut.u_nodes.mem[edge_slot(6'(4 * 8 + 2), 2'd0)];   // above the first ground
      gnd_b     = dut.u_nodes.mem[edge_slot(6'(5 * 8 + 3), 2'd0)];   // above the second ground
      top_net   = dut.u_nodes.mem[edge_slot(6'(1 * 8 + 2), 2'd2)];   // left of R at (1,2)
      mid_net   = dut.u_nodes.mem[edge_slot(6'(1 * 8 + 2), 2'd3)];   // right of R at (1,2)
      right_net = dut.u_nodes.mem[edge_slot(6'(1 * 8 + 4), 2'd3)];   // right of R at (1,4)
      `CHECK(gnd_a == 0 && gnd_b == 0, $sformatf("ground labels %0d %0d", gnd_a, gnd_b))
      `CHECK(top_net != 0 && mid_net != 0 && right_net != 0 && top_net != mid_net &&
             mid_net != right_net && top_net != right_net && top_net < 113 && mid_net < 113 &&
             right_net < 113, $sformatf("net labels %0d %0d %0d", top_net, mid_net, right_net))
      `CHECK(dut.u_nodes.mem[edge_slot(6'(2 * 8 + 3), 2'd1)] == 0,
             "bottom of C at (2,3) is on the grounded cross")
    end
    n_ink = 0;
    for (int k = 0; k < 60000; k++) if (dut.u_vram.mem[k] != 8'hFF) n_ink++;
    `CHECK(n_ink > 500, $sformatf("ideal mode drew %0d inked bytes", n_ink))
    `CHECK(dut.u_analysis.n_merges > 0, "node analysis merged at least one label conflict")
    `CHECK(dut.u_analysis.n_popped == 8'(n_blocks), $sformatf("analysis visited %0d of %0d blocks",
                                                             dut.u_analysis.n_popped, n_blocks))
    $display("INFO: ideal mode drew %0d inked bytes, %0d label merges, done at cycle %0d",
             n_ink, dut.u_analysis.n_merges, cyc);

    // 4. SPICE text, screen and serial export
    @(negedge clk); mode = 2'd2;
    wait (dut.u_spice.done);
    n_lines = 0; n_eot = -1;
    for (int k = 0; k < 2048; k++) begin
      if (dut.u_spice.text[k] == 8'h0A) n_lines++;
      if (dut.u_spice.text[k] == 8'h04) begin n_eot = k; break; end
    end
    `CHECK(n_lines == n_parts, $sformatf("%0d netlist lines for %0d components", n_lines, n_parts))
    `CHECK(n_eot == 22 * n_parts, $sformatf("EOT at %0d", n_eot))
    $display("INFO: spice mode wrote %0d lines, done at cycle %0d", n_lines, cyc);
    @(negedge clk); send = 1;
    @(negedge clk); send = 0;
    repeat ((n_eot + 2) * 10 * CPB + 1000) @(posedge clk);
    `CHECK(rx.size() == n_eot, $sformatf("%0d bytes received, %0d expected", rx.size(), n_eot))
    n_bad = 0;
    for (int k = 0; k < rx.size() && k < n_eot; k++)
      if (rx[k] != dut.u_spice.text[k]) n_bad++;
    `CHECK(n_bad == 0, $sformatf("%0d received bytes differ from the text", n_bad))
    $display("INFO: serial export sent %0d bytes", rx.size());

    // 5. video timing
    `CHECK(n_hs > 1000 && bad_hs == 0, $sformatf("hsync: %0d pulses, %0d bad periods", n_hs, bad_hs))
    `CHECK(n_vs > 2 && bad_vs == 0, $sformatf("vsync: %0d pulses, %0d bad periods", n_vs, bad_vs))
    $display("INFO: %0d lines and %0d frames shown", n_hs, n_vs);
    `TB_END
  end
endmodule
