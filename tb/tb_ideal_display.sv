// tb_ideal_display: the redrawn-circuit writer with behavioural results,
// node value and video RAMs (registered reads) and a fake analysis that
// answers an_start with `finished` 50 cycles later. The sheet holds a
// horizontal resistor (value digit 3, multiplier K) at block (2,2) and a
// horizontal wire at (2,3); the node RAM gives the resistor label 5 on the
// left and 12 on the right. The video RAM starts all zero. Checks: one
// analysis start per activation; the whole frame buffer is cleared to white
// except the two drawn blocks; sprite rows of both blocks equal the
// inverted comp_rom rows; label "5" sits in the left neighbour and "12" on
// the right inside the resistor block; the value digit and the multiplier
// are at their places; the wire gets no label; `done` holds until
// `active` falls, and a second activation redraws the same picture.
// Reference sprites and glyphs come from separate comp_rom and char_rom
// instances (tested on their own).
`include "tb_common.svh"
module tb_ideal_display;
  import hdcr_pkg::*;
  localparam int HO = 18, VO = 44;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        active = 0, an_start, an_done = 0, vram_we, done;
  logic [5:0]  res_addr;
  result_t     res_rdata;
  logic [6:0]  node_addr, node_rdata;
  logic [15:0] vram_addr;
  logic [7:0]  vram_wdata;
  ideal_display dut (.clk, .rst, .active, .an_start, .an_done, .res_addr, .res_rdata, .node_addr,
                     .node_rdata, .vram_we, .vram_addr, .vram_wdata, .done);

  result_t    resm [64];
  logic [6:0] nodem [NNODES];
  logic [7:0] vram [60000];
  always_ff @(posedge clk) begin
    res_rdata  <= resm[res_addr];
    node_rdata <= (node_addr < NNODES) ? nodem[node_addr] : 7'(NODE_UNASSIGNED);
    if (vram_we) vram[vram_addr] <= vram_wdata;
  end

  // fake analysis
  int n_an = 0;
  initial forever begin
    @(posedge clk);
    if (an_start) begin
      n_an++;
      an_done <= 0;
      repeat (50) @(posedge clk);
      an_done <= 1;
    end
  end

  // reference ROMs
  comp_t       rt = T_BLANK;
  logic [5:0]  rr = 0;
  logic [63:0] rbits;
  logic [7:0]  rch = 0, cbits;
  comp_rom u_rc (.clk, .ctype(rt), .row(rr), .bits(rbits));
  char_rom u_rh (.clk, .ch(rch), .row(rr[2:0]), .bits(cbits));

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  function automatic int addr(int g, int line, int byt);
    return (VO + (g / 8) * 64 + line) * 100 + HO + (g % 8) * 8 + byt;
  endfunction

  initial begin
    logic [63:0] spr_r [64], spr_w [64];
    logic [7:0]  g5 [8], g1 [8], g2 [8], g3 [8], gk [8];
    for (int k = 0; k < 64; k++) resm[k] = '{ctype: T_BLANK, value: 12'hFFF, mult: M_NONE};
    for (int k = 0; k < NNODES; k++) nodem[k] = 7'(NODE_UNASSIGNED);
    for (int k = 0; k < 60000; k++) vram[k] = 8'h00;
    resm[18] = '{ctype: T_RES_H,  value: 12'hFF3, mult: M_KILO};
    resm[19] = '{ctype: T_WIRE_H, value: 12'hFFF, mult: M_NONE};
    nodem[edge_slot(6'd18, 2'd2)] = 7'd5;
    nodem[edge_slot(6'd18, 2'd3)] = 7'd12;
    nodem[edge_slot(6'd19, 2'd3)] = 7'd12;
    for (int r = 0; r < 64; r++) begin
      @(negedge clk); rt = T_RES_H;  rr = 6'(r);
      @(negedge clk); spr_r[r] = ~rbits;
      @(negedge clk); rt = T_WIRE_H;
      @(negedge clk); spr_w[r] = ~rbits;
    end
    for (int r = 0; r < 8; r++) begin
      @(negedge clk); rr = 6'(r); rch = "5"; @(negedge clk); g5[r] = ~cbits;
      @(negedge clk); rch = "1"; @(negedge clk); g1[r] = ~cbits;
      @(negedge clk); rch = "2"; @(negedge clk); g2[r] = ~cbits;
      @(negedge clk); rch = "3"; @(negedge clk); g3[r] = ~cbits;
      @(negedge clk); rch = "K"; @(negedge clk); gk[r] = ~cbits;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int run = 0; run < 2; run++) begin
      int cyc, n_bad, n_other;
      if (run == 1) for (int k = 0; k < 60000; k++) vram[k] = 8'h00;
      @(negedge clk); active = 1;
      cyc = 0;
      while (!done && cyc < 900000) begin @(negedge clk); cyc++; end
      `CHECK(done, $sformatf("run %0d done after %0d cycles", run, cyc))
      `CHECK(n_an == run + 1, $sformatf("%0d analysis starts", n_an))
      n_bad = 0;
      for (int r = 0; r < 32; r++)
        for (int b = 0; b < 8; b++) begin
          if (vram[addr(18, r, b)] != spr_r[r][63 - 8 * b -: 8]) n_bad++;
          if (vram[addr(19, r, b)] != spr_w[r][63 - 8 * b -: 8]) n_bad++;
        end
      for (int r = 32; r < 40; r++)
        for (int b = 0; b < 8; b++)
          if (vram[addr(19, r, b)] != spr_w[r][63 - 8 * b -: 8]) n_bad++;   // no wire labels
      `CHECK(n_bad == 0, $sformatf("run %0d: %0d sprite bytes wrong", run, n_bad))
      n_bad = 0;
      for (int r = 0; r < 8; r++) begin
        if (vram[addr(18, 32 + r, -1)] != g5[r]) n_bad++;
        if (vram[addr(18, 32 + r, -2)] != 8'hFF) n_bad++;
        if (vram[addr(18, 32 + r, 6)] != g1[r]) n_bad++;
        if (vram[addr(18, 32 + r, 7)] != g2[r]) n_bad++;
        if (vram[addr(18, 48 + r, 7)] != g3[r]) n_bad++;
        if (vram[addr(18, 56 + r, 7)] != gk[r]) n_bad++;
      end
      `CHECK(n_bad == 0, $sformatf("run %0d: %0d label/value bytes wrong", run, n_bad))
      n_other = 0;
      for (int k = 0; k < 60000; k++) begin
        int line, byt;
        line = k / 100 - VO - 128;
        byt  = k % 100 - HO - 16;
        if (!(line >= 0 && line < 64 && byt >= -2 && byt < 16) && vram[k] != 8'hFF) n_other++;
      end
      `CHECK(n_other == 0, $sformatf("run %0d: %0d bytes outside the drawing not white", run, n_other))
      repeat (20) @(negedge clk);
      `CHECK(done, "done holds while active")
      @(negedge clk); active = 0;
      repeat (3) @(negedge clk);
      `CHECK(!done, "done falls after active")
    end
    `TB_END
  end
endmodule
