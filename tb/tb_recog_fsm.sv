// tb_recog_fsm: the recognition stage on a whole sheet. Every component
// type is drawn in its own grid block (blocks 0..24, components with a
// value digit and multiplier letter), the rest of the sheet is blank grid
// paper. A behavioural image ROM (registered read) feeds the FSM, and a
// results array takes its writes. Checks each block's result word, that
// every block is written exactly once and in order, that `finished`
// rises once after about 550,000 cycles and then stays high.
`include "tb_common.svh"
module tb_recog_fsm;
  import tb_img_pkg::*;
  import hdcr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [11:0] rom_addr;
  logic [63:0] rom_data;
  logic        res_we;
  logic [5:0]  res_addr, block;
  result_t     res_wdata;
  logic        finished;

  recog_fsm dut (.clk, .rst, .rom_addr, .rom_data, .res_we, .res_addr, .res_wdata, .block,
                 .finished);

  logic [63:0] rom [4096];
  result_t     res [64];
  int          nwr [64];
  int          order_bad = 0, last = -1;
  always_ff @(posedge clk) begin
    rom_data <= rom[rom_addr];
    if (res_we) begin
      res[res_addr] <= res_wdata;
      nwr[res_addr] <= nwr[res_addr] + 1;
      if (int'(res_addr) != last + 1 && !(int'(res_addr) == last && nwr[res_addr] > 0)) order_bad++;
      last = int'(res_addr);
    end
  end

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    int cyc, nb;
    clear(); grid();
    for (int t = 0; t <= int'(T_TEE_RTB); t++) begin
      draw_comp(t / 8, t % 8, comp_t'(t));
      if (is_netlist_part(comp_t'(t))) begin
        draw_char(t / 8, t % 8, 38, 46, digit_segs(t % 10));
        draw_char(t / 8, t % 8, 48, 46, mult_segs(t % 7));
      end
    end
    for (int a = 0; a < 4096; a++) rom[a] = rom_word(a);
    for (int b = 0; b < 64; b++) begin nwr[b] = 0; res[b] = '0; end
    repeat (3) @(negedge clk);
    rst = 0;
    cyc = 0;
    while (!finished && cyc < 700000) begin @(negedge clk); cyc++; end
    `CHECK(finished && cyc > 500000 && cyc < 600000, $sformatf("finished after %0d cycles", cyc))
    nb = 0;
    for (int b = 0; b < 64; b++) begin
      comp_t t;
      t = (b <= int'(T_TEE_RTB)) ? comp_t'(b) : T_BLANK;
      `CHECK(nwr[b] == 1, $sformatf("block %0d written %0d times", b, nwr[b]))
      `CHECK(res[b].ctype == t, $sformatf("block %0d type %0d", b, res[b].ctype))
      if (is_netlist_part(t)) begin
        `CHECK(res[b].value == {8'hFF, 4'(b % 10)} && res[b].mult == 3'(b % 7),
               $sformatf("block %0d value %h mult %0d", b, res[b].value, res[b].mult))
      end
    end
    `CHECK(order_bad == 0, "blocks written in order")
    repeat (1000) @(negedge clk);
    `CHECK(finished, "finished stays high")
    `TB_END
  end
endmodule
