// analysis: finds the electrical nodes of the recognized circuit and gives
// each a label, stored in the node value RAM.
//
// The node value RAM has one 7-bit slot per interior block boundary of the
// 8x8 grid (112 slots, numbered by hdcr_pkg::edge_slot). Label 0 is
// ground, labels 1, 2, ... come from a counter, and 113 marks a slot that
// has no label yet. Steps:
//   1. write 113 to all 112 slots;
//   2. scan the results RAM for the first non-blank block and push it on
//      the stack (the enqueued list, a 64-bit register, marks it);
//   3. pop a block; read its type, and the slots of those of its edges that
//      are terminals (edges on the sheet border have no slot);
//      - wire junctions (wires and connectors): every terminal gets the
//        lowest existing label, or a new one if none has a label; every
//        other label found is then replaced by the lowest one in the whole
//        RAM (one pass of the RAM per conflicting label);
//      - ground: the terminal gets 0 and an old label there is replaced by
//        0 in the whole RAM;
//      - other components: terminals without a label get new labels,
//        labelled ones are kept;
//   4. push every neighbour across a terminal edge that is not yet in the
//      enqueued list, and go back to 3 until the stack returns its
//      start-of-stack symbol.
// This is the document's depth-first search and node-assignment rules; the
// exact order of RAM accesses is this design's. The stack is instantiated
// here and driven with its three-cycle command protocol.
// Interface: start pulse; the results RAM and node value RAM are outside
// (registered reads, one cycle); `finished` stays high from the end of
// the search until the next start. A sparse circuit takes a few thousand
// cycles; each label conflict costs one 224-cycle RAM pass.
module analysis
  import hdcr_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  output logic [5:0] res_addr,
  input  result_t    res_rdata,
  output logic       node_we,
  output logic [6:0] node_addr,
  output logic [6:0] node_wdata,
  input  logic [6:0] node_rdata,
  output logic       busy,
  output logic       finished,
  // activity counters for observation
  output logic [7:0] n_popped,
  output logic [7:0] n_merges
);
  typedef enum logic [4:0] {
    S_IDLE, S_INIT, S_FIND_RD, S_FIND_CHK, S_PUSH, S_POP, S_TYPE_RD, S_TYPE_GET,
    S_EDGE_RD, S_EDGE_GET, S_DECIDE, S_WRITE, S_REPL_NEXT, S_REPL_RD, S_REPL_CHK,
    S_NB, S_DONE
  } state_t;

  state_t      state, ret;
  logic [63:0] enq;
  logic [6:0]  next_label;
  logic [6:0]  j;              // slot index for init and replace passes
  logic [5:0]  loc, scan;
  logic [1:0]  sd;             // edge side: 0 top, 1 bottom, 2 left, 3 right
  logic [1:0]  cnt;            // stack command cycle counter
  logic [6:0]  push_val;
  comp_t       ctype;
  edges_t      ed;
  logic [3:0]  has;            // terminal edge with a slot, per side
  logic [6:0]  v   [4];        // label found on each side
  logic [6:0]  lab;            // label written by a junction or ground
  logic [3:0]  rep;            // sides whose old label is to be replaced

  logic [1:0]  st_cmd;
  logic [6:0]  pop_data;
  logic        pop_valid;

  stack u_stack (
    .clk, .rst,
    .cmd       (st_cmd),
    .push_data (push_val),
    .pop_data,
    .pop_valid,
    .busy      ()
  );

  function automatic logic side_edge(edges_t e, logic [1:0] s);
    case (s)
      2'd0: return e.top;
      2'd1: return e.bottom;
      2'd2: return e.left;
      default: return e.right;
    endcase
  endfunction

  function automatic logic [5:0] neighbour(logic [5:0] l, logic [1:0] s);
    case (s)
      2'd0: return l - 6'd8;
      2'd1: return l + 6'd8;
      2'd2: return l - 6'd1;
      default: return l + 6'd1;
    endcase
  endfunction

  logic [6:0] slot;
  assign slot = edge_slot(loc, sd);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      ret        <= S_IDLE;
      enq        <= '0;
      next_label <= 7'd1;
      j          <= '0;
      loc        <= '0;
      scan       <= '0;
      sd         <= '0;
      cnt        <= '0;
      push_val   <= '0;
      ctype      <= T_BLANK;
      has        <= '0;
      rep        <= '0;
      lab        <= '0;
      n_popped   <= '0;
      n_merges   <= '0;
      for (int k = 0; k < 4; k++) v[k] <= NODE_UNASSIGNED;
    end else begin
      case (state)
        S_IDLE, S_DONE: if (start) begin
          enq        <= '0;
          next_label <= 7'd1;
          j          <= '0;
          n_popped   <= '0;
          n_merges   <= '0;
          state      <= S_INIT;
        end
        S_INIT: begin
          j <= j + 1'b1;
          if (int'(j) == NNODES - 1) begin scan <= '0; state <= S_FIND_RD; end
        end
        S_FIND_RD:  state <= S_FIND_CHK;
        S_FIND_CHK: begin
          if (res_rdata.ctype != T_BLANK) begin
            enq[scan] <= 1'b1;
            push_val  <= {1'b0, scan};
            cnt       <= '0;
            ret       <= S_POP;
            state     <= S_PUSH;
          end else if (scan == 6'd63) state <= S_DONE;
          else begin
            scan  <= scan + 1'b1;
            state <= S_FIND_RD;
          end
        end
        // Push: command held three cycles, then one cycle for the stack to
        // return to idle.
        S_PUSH: begin
          cnt <= cnt + 1'b1;
          if (cnt == 2'd3) state <= ret;
        end
        // Pop: command held three cycles; data captured while valid.
        S_POP: begin
          cnt <= cnt + 1'b1;
          if (pop_valid) push_val <= pop_data;
          if (cnt == 2'd3) begin
            cnt <= '0;
            if (push_val == STACK_SOS) state <= S_DONE;
            else begin
              loc      <= push_val[5:0];
              n_popped <= n_popped + 1'b1;
              state    <= S_TYPE_RD;
            end
          end
        end
        S_TYPE_RD:  state <= S_TYPE_GET;
        S_TYPE_GET: begin
          ctype <= res_rdata.ctype;
          ed    <= type_edges(res_rdata.ctype);
          sd    <= '0;
          state <= S_EDGE_RD;
        end
        S_EDGE_RD:  state <= S_EDGE_GET;
        S_EDGE_GET: begin
          has[sd] <= side_edge(ed, sd) && (slot != 7'(NNODES));
          v[sd]   <= (side_edge(ed, sd) && (slot != 7'(NNODES))) ? node_rdata : NODE_UNASSIGNED;
          sd      <= sd + 1'b1;
          state   <= (sd == 2'd3) ? S_DECIDE : S_EDGE_RD;
        end
        S_DECIDE: begin
          logic [6:0] mn;
          mn = NODE_UNASSIGNED;
          for (int k = 0; k < 4; k++) if (has[k] && v[k] < mn) mn = v[k];
          if (ctype == T_GND) lab <= 7'd0;
          else if (is_junction(ctype)) begin
            if (mn == NODE_UNASSIGNED && has != '0) begin
              lab        <= next_label;
              next_label <= next_label + 1'b1;
            end else lab <= mn;
          end
          sd    <= '0;
          state <= S_WRITE;
        end
        // One cycle per side: write the label of this side.
        S_WRITE: begin
          if (has[sd] && !(ctype == T_GND || is_junction(ctype)) && v[sd] == NODE_UNASSIGNED)
            next_label <= next_label + 1'b1;
          rep[sd] <= has[sd] && (ctype == T_GND || is_junction(ctype)) &&
                     v[sd] != NODE_UNASSIGNED && v[sd] != lab;
          sd <= sd + 1'b1;
          if (sd == 2'd3) begin sd <= '0; state <= S_REPL_NEXT; end
        end
        // Replace passes for every conflicting old label.
        S_REPL_NEXT: begin
          if (rep[sd]) begin
            j        <= '0;
            rep[sd]  <= 1'b0;
            n_merges <= n_merges + 1'b1;
            state    <= S_REPL_RD;
          end else if (sd == 2'd3) begin
            sd    <= '0;
            state <= S_NB;
          end else sd <= sd + 1'b1;
        end
        S_REPL_RD:  state <= S_REPL_CHK;
        S_REPL_CHK: begin
          j <= j + 1'b1;
          state <= (int'(j) == NNODES - 1) ? S_REPL_NEXT : S_REPL_RD;
        end
        // Push unvisited neighbours across terminal edges.
        S_NB: begin
          logic [5:0] n;
          n = neighbour(loc, sd);
          sd <= sd + 1'b1;
          if (has[sd] && !enq[n]) begin
            enq[n]   <= 1'b1;
            push_val <= {1'b0, n};
            cnt      <= '0;
            ret      <= (sd == 2'd3) ? S_POP : S_NB;
            state    <= S_PUSH;
          end else if (sd == 2'd3) begin
            cnt   <= '0;
            state <= S_POP;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Stack commands
  always_comb begin
    st_cmd = 2'd0;
    if (state == S_PUSH && cnt != 2'd3) st_cmd = 2'd2;
    if (state == S_POP  && cnt != 2'd3) st_cmd = 2'd3;
  end

  // RAM ports
  always_comb begin
    res_addr   = (state == S_FIND_RD || state == S_FIND_CHK) ? scan : loc;
    node_we    = 1'b0;
    node_addr  = slot;
    node_wdata = lab;
    case (state)
      S_INIT: begin
        node_we    = 1'b1;
        node_addr  = j;
        node_wdata = NODE_UNASSIGNED;
      end
      S_WRITE: begin
        node_we    = has[sd] && ((ctype == T_GND || is_junction(ctype)) || v[sd] == NODE_UNASSIGNED);
        node_wdata = (ctype == T_GND || is_junction(ctype)) ? lab : next_label;
      end
      S_REPL_RD: node_addr = j;
      S_REPL_CHK: begin
        node_addr = j;
        node_we   = (node_rdata == v[sd]);
      end
      default: ;
    endcase
  end

  assign busy     = (state != S_IDLE) && (state != S_DONE);
  assign finished = (state == S_DONE);
endmodule
