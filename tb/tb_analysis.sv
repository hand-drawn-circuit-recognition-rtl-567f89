// tb_analysis: node analysis against a union-find reference model.
// Three scenarios, each loaded into a behavioural results RAM (registered
// read, like sp_ram) and analysed from a start pulse:
//   1. blank sheet: every node slot must stay unassigned (113);
//   2. a two-loop circuit (source, resistors, capacitors, two grounds, a
//      cross, tees, corners and wires) whose depth-first search has to
//      merge labels;
//   3. the same circuit again, to check a second start works.
// Reference: every terminal slot is a set; each wire junction joins its
// terminal slots, each ground joins its slot to the ground set. Checks
// that slots get equal labels exactly when they are in the same set, that
// the ground set is labelled 0, that non-terminal slots stay 113, and the
// number of blocks popped from the stack.
`include "tb_common.svh"
module tb_analysis;
  import hdcr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       start = 0;
  logic [5:0] res_addr;
  result_t    res_rdata;
  logic       node_we;
  logic [6:0] node_addr, node_wdata, node_rdata;
  logic       busy, finished;
  logic [7:0] n_popped, n_merges;

  analysis dut (.clk, .rst, .start, .res_addr, .res_rdata, .node_we, .node_addr, .node_wdata,
                .node_rdata, .busy, .finished, .n_popped, .n_merges);

  result_t    resm  [64];
  logic [6:0] nodem [NNODES];
  always_ff @(posedge clk) begin
    res_rdata  <= resm[res_addr];
    if (node_we && node_addr < NNODES) nodem[node_addr] <= node_wdata;
    node_rdata <= (node_addr < NNODES) ? nodem[node_addr] : 7'd0;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  // union-find over the 112 slots plus the ground set (index 112)
  int parent [NNODES + 1];
  function automatic int find(int x);
    while (parent[x] != x) x = parent[x];
    return x;
  endfunction
  function automatic void unite(int a, int b);
    parent[find(a)] = find(b);
  endfunction

  function automatic void put(int r, int c, comp_t t);
    resm[r * 8 + c] = '{ctype: t, value: 12'hFF1, mult: M_KILO};
  endfunction

  initial begin
    bit used [NNODES + 1];
    int nblocks;
    for (int k = 0; k < 64; k++) resm[k] = '{ctype: T_BLANK, value: 12'hFFF, mult: M_NONE};
    for (int k = 0; k < NNODES; k++) nodem[k] = 7'd55;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int sc = 0; sc < 3; sc++) begin
      int cyc;
      if (sc == 1) begin
        put(1, 1, T_CONN_BR); put(1, 2, T_RES_H); put(1, 3, T_TEE_LBR); put(1, 4, T_RES_H);
        put(1, 5, T_CONN_BL);
        put(2, 1, T_SRC_V);   put(2, 3, T_CAP_V); put(2, 5, T_WIRE_V);
        put(3, 1, T_CONN_TR); put(3, 2, T_TEE_LBR); put(3, 3, T_CROSS); put(3, 4, T_WIRE_H);
        put(3, 5, T_CONN_TL);
        put(4, 2, T_GND);     put(4, 3, T_CAP_V);
        put(5, 3, T_GND);
      end
      // reference sets
      nblocks = 0;
      for (int k = 0; k <= NNODES; k++) begin parent[k] = k; used[k] = 0; end
      used[NNODES] = 1;
      for (int b = 0; b < 64; b++) begin
        comp_t  t;
        edges_t e;
        int     first;
        t = resm[b].ctype;
        if (t == T_BLANK) continue;
        nblocks++;
        e = type_edges(t);
        first = -1;
        for (int s = 0; s < 4; s++) begin
          int sl;
          if (!(s == 0 ? e.top : s == 1 ? e.bottom : s == 2 ? e.left : e.right)) continue;
          sl = int'(edge_slot(6'(b), 2'(s)));
          if (sl >= NNODES) continue;
          used[sl] = 1;
          if (t == T_GND) unite(sl, NNODES);
          if (is_junction(t)) begin
            if (first >= 0) unite(sl, first);
            first = sl;
          end
        end
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!finished && cyc < 100000) begin @(negedge clk); cyc++; end
      `CHECK(finished, $sformatf("scenario %0d finished (%0d cycles)", sc, cyc))
      `CHECK(!busy, "not busy when finished")
      `CHECK(n_popped == 8'(nblocks), $sformatf("scenario %0d: %0d blocks popped, %0d expected",
                                                sc, n_popped, nblocks))
      for (int a = 0; a < NNODES; a++) begin
        if (!used[a]) begin
          `CHECK(nodem[a] == 7'(NODE_UNASSIGNED), $sformatf("slot %0d unused but %0d", a, nodem[a]))
          continue;
        end
        `CHECK(nodem[a] != 7'(NODE_UNASSIGNED), $sformatf("terminal slot %0d unassigned", a))
        `CHECK((nodem[a] == 7'd0) == (find(a) == find(NNODES)),
               $sformatf("slot %0d ground label mismatch (%0d)", a, nodem[a]))
        for (int b = a + 1; b < NNODES; b++)
          if (used[b])
            `CHECK((nodem[a] == nodem[b]) == (find(a) == find(b)),
                   $sformatf("slots %0d,%0d labels %0d,%0d", a, b, nodem[a], nodem[b]))
      end
      if (sc == 1) $display("INFO: two-loop circuit: %0d cycles, %0d merges", cyc, n_merges);
    end
    `TB_END
  end
endmodule
