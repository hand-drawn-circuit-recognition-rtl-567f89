// tb_video_major: the video major FSM against a cycle-level model. Random
// mode changes (held for random times), recog_done rising part way, a
// random analysis busy flag and random writer buses; every cycle checks
// which writer is active, that at most one is, that a writer sees `active`
// fall before another rises, and the routing of the video RAM, results
// RAM and node value RAM ports and of the analysis start.
`include "tb_common.svh"
module tb_video_major;
  import hdcr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0]  mode = 3;
  logic        recog_done = 0;
  logic        raw_active, ideal_active, spice_active;
  logic        raw_we = 0, ideal_we = 0, spice_we = 0;
  logic [15:0] raw_addr = 0, ideal_addr = 0, spice_addr = 0;
  logic [7:0]  raw_wdata = 0, ideal_wdata = 0, spice_wdata = 0;
  logic        vram_we;
  logic [15:0] vram_addr;
  logic [7:0]  vram_wdata;
  logic        recog_we = 0;
  logic [5:0]  recog_addr = 0, an_res_addr = 0, ideal_res_addr = 0, spice_res_addr = 0;
  logic        res_we;
  logic [5:0]  res_addr;
  logic        an_busy = 0, an_node_we = 0;
  logic [6:0]  an_node_addr = 0, ideal_node_addr = 0, spice_node_addr = 0;
  logic        node_we;
  logic [6:0]  node_addr;
  logic        ideal_an_start = 0, spice_an_start = 0, an_start;

  video_major dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  // model: 0 idle, 1 raw, 2 ideal, 3 spice
  int st = 0;
  always @(posedge clk)
    if (rst) st <= 0;
    else case (st)
      0: st <= (mode == 0) ? 1 : (mode == 1 && recog_done) ? 2 : (mode == 2 && recog_done) ? 3 : 0;
      1: if (mode != 0) st <= 0;
      2: if (mode != 1) st <= 0;
      3: if (mode != 2) st <= 0;
    endcase

  initial begin
    int hold = 0, n_bad_route = 0, n_bad_act = 0, n_two = 0, prev_act = 0, n_switch = 0;
    int seen [4] = '{0, 0, 0, 0};
    repeat (3) @(negedge clk);
    rst = 0;
    for (int c = 0; c < 20000; c++) begin
      int act;
      logic        e_we;
      logic [15:0] e_addr;
      logic [7:0]  e_wd;
      if (hold == 0) begin mode = 2'($urandom_range(0, 3)); hold = $urandom_range(1, 60); end
      hold--;
      if (c == 5000) recog_done = 1;
      an_busy = ($urandom_range(0, 3) == 0);
      {raw_we, ideal_we, spice_we, recog_we, an_node_we, ideal_an_start, spice_an_start} = 7'($urandom);
      raw_addr = 16'($urandom); ideal_addr = 16'($urandom); spice_addr = 16'($urandom);
      raw_wdata = 8'($urandom); ideal_wdata = 8'($urandom); spice_wdata = 8'($urandom);
      {recog_addr, an_res_addr, ideal_res_addr, spice_res_addr} = 24'($urandom);
      {an_node_addr, ideal_node_addr, spice_node_addr} = 21'($urandom);
      #1;
      // active flags
      act = raw_active ? 1 : ideal_active ? 2 : spice_active ? 3 : 0;
      if (int'(raw_active) + int'(ideal_active) + int'(spice_active) > 1) n_two++;
      if (raw_active   != (st == 1 && mode == 0)) n_bad_act++;
      if (ideal_active != (st == 2 && mode == 1)) n_bad_act++;
      if (spice_active != (st == 3 && mode == 2)) n_bad_act++;
      if (act != 0 && prev_act != 0 && act != prev_act) n_bad_act++;
      if (act != prev_act && act != 0) n_switch++;
      prev_act = act;
      seen[st]++;
      // video RAM port
      case (st)
        1: begin e_we = raw_we;   e_addr = raw_addr;   e_wd = raw_wdata;   end
        2: begin e_we = ideal_we; e_addr = ideal_addr; e_wd = ideal_wdata; end
        3: begin e_we = spice_we; e_addr = spice_addr; e_wd = spice_wdata; end
        default: begin e_we = 0; e_addr = vram_addr; e_wd = vram_wdata; end
      endcase
      if (vram_we != e_we || vram_addr != e_addr || vram_wdata != e_wd) n_bad_route++;
      // results RAM port
      if (!recog_done) begin
        if (res_we != recog_we || res_addr != recog_addr) n_bad_route++;
      end else begin
        if (res_we) n_bad_route++;
        if (res_addr != (an_busy ? an_res_addr : (st == 2) ? ideal_res_addr : spice_res_addr))
          n_bad_route++;
      end
      // node value RAM port
      if (an_busy) begin
        if (node_we != an_node_we || node_addr != an_node_addr) n_bad_route++;
      end else if (node_we || node_addr != ((st == 2) ? ideal_node_addr : spice_node_addr))
        n_bad_route++;
      if (an_start != (ideal_an_start | spice_an_start)) n_bad_route++;
      @(negedge clk);
    end
    `CHECK(n_bad_act == 0, $sformatf("%0d wrong active flags", n_bad_act))
    `CHECK(n_two == 0, $sformatf("%0d cycles with two writers active", n_two))
    `CHECK(n_bad_route == 0, $sformatf("%0d routing errors", n_bad_route))
    `CHECK(seen[1] > 0 && seen[2] > 0 && seen[3] > 0 && n_switch > 20,
           $sformatf("modes visited %0d %0d %0d, %0d switches", seen[1], seen[2], seen[3], n_switch))
    `TB_END
  end
endmodule
