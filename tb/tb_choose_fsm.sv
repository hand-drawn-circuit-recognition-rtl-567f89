// tb_choose_fsm: draws every component type the recognizer knows (each in
// its own grid block, components with a value digit and a multiplier
// letter in the text corner), loads each block into behavioural row and
// column RAMs, runs the component chooser and checks the type code and
// the detected terminal edges. Checks the edge-check latency too: a block
// named from its edges alone finishes 10 cycles after start.
`include "tb_common.svh"
module tb_choose_fsm;
  import tb_img_pkg::*;
  import hdcr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start = 0;
  logic [5:0]  addr;
  logic [63:0] row_word_q, col_word_q;
  comp_t       ctype;
  edges_t      edges;
  logic        busy, finished;

  choose_fsm dut (.clk, .rst, .start, .addr, .row_word(row_word_q), .col_word(col_word_q),
                  .ctype, .edges, .busy, .finished);

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

  initial begin
    int shape_runs = 0;
    clear(); grid();
    for (int t = 0; t <= int'(T_TEE_RTB); t++) begin
      draw_comp(t / 8, t % 8, comp_t'(t));
      if (is_netlist_part(comp_t'(t))) begin
        draw_char(t / 8, t % 8, 38, 46, digit_segs(t % 10));
        draw_char(t / 8, t % 8, 48, 46, mult_segs(t % 7));
      end
    end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t <= int'(T_TEE_RTB); t++) begin
      int cyc;
      for (int i = 0; i < 64; i++) begin
        rowm[i] = row_word(t / 8, t % 8, i);
        colm[i] = col_word(t / 8, t % 8, i);
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!finished && cyc < 1000) begin @(negedge clk); cyc++; end
      `CHECK(ctype == comp_t'(t), $sformatf("type %0d recognized as %0d", t, ctype))
      `CHECK(edges == type_edges(comp_t'(t)), $sformatf("edges of type %0d: %b", t, edges))
      if (cyc > 20) shape_runs++;
      else `CHECK(cyc == 10, $sformatf("edge-only decision latency %0d", cyc))
    end
    `CHECK(shape_runs == 14, $sformatf("shape tests run for 14 types (got %0d)", shape_runs))
    `TB_END
  end
endmodule
