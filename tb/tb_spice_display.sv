// tb_spice_display: the SPICE writer with behavioural results, node value
// and video RAMs and a fake analysis (finished 50 cycles after an_start).
// The sheet holds a vertical source, a horizontal resistor with one
// unlabelled terminal, an NPN transistor, a capacitor, a vertical resistor
// with a three-digit value, plus a wire and a ground that must not be
// listed. Checks: the netlist text read back through the serial read port
// equals the expected 22-byte lines, in block order, followed by EOT;
// text_ready; the screen shows the text (first and last characters compared
// with char_rom glyphs, everything outside the text area white); `done`.
`include "tb_common.svh"
module tb_spice_display;
  import hdcr_pkg::*;
  localparam int XO = 39, VO = 44;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        active = 0, an_start, an_done = 0, vram_we, text_ready, done;
  logic [5:0]  res_addr;
  result_t     res_rdata;
  logic [6:0]  node_addr, node_rdata;
  logic [15:0] vram_addr;
  logic [7:0]  vram_wdata, ser_data;
  logic [10:0] ser_addr = 0;
  spice_display dut (.clk, .rst, .active, .an_start, .an_done, .res_addr, .res_rdata, .node_addr,
                     .node_rdata, .vram_we, .vram_addr, .vram_wdata, .ser_addr, .ser_data,
                     .text_ready, .done);

  result_t    resm [64];
  logic [6:0] nodem [NNODES];
  logic [7:0] vram [60000];
  always_ff @(posedge clk) begin
    res_rdata  <= resm[res_addr];
    node_rdata <= (node_addr < NNODES) ? nodem[node_addr] : 7'(NODE_UNASSIGNED);
    if (vram_we) vram[vram_addr] <= vram_wdata;
  end

  initial forever begin
    @(posedge clk);
    if (an_start) begin
      an_done <= 0;
      repeat (50) @(posedge clk);
      an_done <= 1;
    end
  end

  logic [7:0] rch = 0, cbits;
  logic [2:0] rrow = 0;
  char_rom u_rh (.clk, .ch(rch), .row(rrow), .bits(cbits));

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  function automatic void lbl(int g, int side, int v);
    nodem[edge_slot(6'(g), 2'(side))] = 7'(v);
  endfunction

  initial begin
    string exp;
    int    cyc, n_bad, n_other;
    logic [7:0] gv [8], gm [8];
    for (int k = 0; k < 64; k++) resm[k] = '{ctype: T_BLANK, value: 12'hFFF, mult: M_NONE};
    for (int k = 0; k < NNODES; k++) nodem[k] = 7'(NODE_UNASSIGNED);
    for (int k = 0; k < 60000; k++) vram[k] = 8'h00;
    resm[9]  = '{ctype: T_SRC_V,  value: 12'hF47, mult: M_NONE};  lbl(9, 0, 3);  lbl(9, 1, 0);
    resm[18] = '{ctype: T_RES_H,  value: 12'hFF3, mult: M_KILO};  lbl(18, 2, 12);
    resm[19] = '{ctype: T_WIRE_H, value: 12'hFFF, mult: M_NONE};
    resm[30] = '{ctype: T_NPN_L,  value: 12'hFFF, mult: M_NONE};
    lbl(30, 0, 7); lbl(30, 2, 8); lbl(30, 1, 0);
    resm[40] = '{ctype: T_CAP_V,  value: 12'hFF1, mult: M_MICRO}; lbl(40, 0, 0); lbl(40, 1, 10);
    resm[41] = '{ctype: T_RES_V,  value: 12'h123, mult: M_MEGA};  lbl(41, 1, 11);
    resm[49] = '{ctype: T_GND,    value: 12'hFFF, mult: M_NONE};
    exp = {"V1   3  0    DC   47 \n",
           "R1  12 --          3K\n",
           "Q1   7  8  0 NPN     \n",
           "C1   0 10          1U\n",
           "R2  -- 11        123M\n", "\004"};
    for (int r = 0; r < 8; r++) begin
      @(negedge clk); rrow = 3'(r); rch = "V"; @(negedge clk); gv[r] = ~cbits;
      @(negedge clk); rch = "M"; @(negedge clk); gm[r] = ~cbits;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    `CHECK(!text_ready, "no text before the first run")
    @(negedge clk); active = 1;
    cyc = 0;
    while (!done && cyc < 900000) begin @(negedge clk); cyc++; end
    `CHECK(done && text_ready, $sformatf("done after %0d cycles, text_ready", cyc))
    n_bad = 0;
    for (int k = 0; k < exp.len(); k++) begin
      @(negedge clk); ser_addr = 11'(k);
      @(negedge clk);
      if (ser_data != exp[k]) begin
        n_bad++;
        if (n_bad < 5) $display("text[%0d] = %h, expected %h", k, ser_data, exp[k]);
      end
    end
    `CHECK(n_bad == 0, $sformatf("%0d netlist bytes differ", n_bad))
    n_bad = 0;
    for (int r = 0; r < 8; r++) begin
      if (vram[(VO + r) * 100 + XO] != gv[r]) n_bad++;
      if (vram[(VO + 32 + r) * 100 + XO + 20] != gm[r]) n_bad++;
    end
    `CHECK(n_bad == 0, $sformatf("%0d glyph bytes on screen wrong", n_bad))
    n_other = 0;
    for (int k = 0; k < 60000; k++) begin
      int line, byt;
      line = k / 100 - VO;
      byt  = k % 100 - XO;
      if (!(line >= 0 && line < 40 && byt >= 0 && byt < 21) && vram[k] != 8'hFF) n_other++;
    end
    `CHECK(n_other == 0, $sformatf("%0d bytes outside the text not white", n_other))
    @(negedge clk); active = 0;
    repeat (3) @(negedge clk);
    `CHECK(!done, "done falls after active")
    `TB_END
  end
endmodule
