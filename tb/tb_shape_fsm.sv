// tb_shape_fsm: runs each kind of specialised minor FSM directly on drawn
// blocks: horizontal and vertical resistor, capacitor, source and wire,
// ground and negative supply, NPN and T-connector with the base or stub on
// either side. Also checks the run time: two cycles per line for lines
// 4..59, plus start, decision and done.
`include "tb_common.svh"
module tb_shape_fsm;
  import tb_img_pkg::*;
  import hdcr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start = 0;
  shape_kind_t kind = K_H2;
  logic [5:0]  addr;
  logic [63:0] row_word_q, col_word_q;
  comp_t       ctype;
  logic        busy, finished;

  shape_fsm dut (.clk, .rst, .start, .kind, .addr, .row_word(row_word_q), .col_word(col_word_q),
                 .ctype, .busy, .finished);

  logic [63:0] rowm [64], colm [64];
  always_ff @(posedge clk) begin
    row_word_q <= rowm[addr];
    col_word_q <= colm[addr];
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  task automatic run(comp_t t, shape_kind_t k, bit with_text);
    int cyc;
    clear(); grid();
    draw_comp(1, 1, t);
    if (with_text) begin
      draw_char(1, 1, 38, 46, digit_segs(8));
      draw_char(1, 1, 48, 46, mult_segs(6));
    end
    for (int i = 0; i < 64; i++) begin
      rowm[i] = row_word(1, 1, i);
      colm[i] = col_word(1, 1, i);
    end
    @(negedge clk); start = 1; kind = k;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!finished && cyc < 1000) begin @(negedge clk); cyc++; end
    `CHECK(ctype == t, $sformatf("kind %0d: want type %0d got %0d", k, t, ctype))
    `CHECK(cyc == 1 + 56 * 2 + 1, $sformatf("run time %0d", cyc))
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 28; n++) begin
      comp_t       tl [14] = '{T_RES_H, T_CAP_H, T_SRC_H, T_WIRE_H, T_RES_V, T_CAP_V, T_SRC_V,
                               T_WIRE_V, T_GND, T_PS_NEG, T_NPN_L, T_TEE_LTB, T_NPN_R, T_TEE_RTB};
      shape_kind_t kl [14] = '{K_H2, K_H2, K_H2, K_H2, K_V2, K_V2, K_V2, K_V2, K_T1, K_T1,
                               K_LTB, K_LTB, K_RTB, K_RTB};
      // second round: components with a value written in the text corner
      run(tl[n % 14], kl[n % 14], n >= 14 && is_netlist_part(tl[n % 14]));
    end
    `TB_END
  end
endmodule
