// tb_stack: pushes a sequence of values and pops them back, checking the
// first-in last-out order, the three-cycle command timing (pop data valid
// exactly in the two cycles after the command is seen), and that popping
// an empty stack returns the start-of-stack symbol without moving below it.
`include "tb_common.svh"
module tb_stack;
  import hdcr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0] cmd = 0;
  logic [6:0] push_data = 0, pop_data;
  logic       pop_valid, busy;

  stack dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  task automatic push(input logic [6:0] v);
    @(negedge clk);
    cmd = 2'd2; push_data = v;
    repeat (3) @(negedge clk);
    cmd = 2'd0;
    @(negedge clk);
  endtask

  task automatic pop(output logic [6:0] v, output int valid_cycles);
    int first;
    @(negedge clk);
    cmd = 2'd3;
    valid_cycles = 0; first = -1; v = 'x;
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      if (k == 2) cmd = 2'd0;
      if (pop_valid) begin
        if (first < 0) first = k;
        valid_cycles++;
        v = pop_data;
      end
    end
    `CHECK(first == 0, "pop data valid in the cycle after the command is seen")
  endtask

  initial begin
    logic [6:0] v;
    logic [6:0] vals [40];
    int vc;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    // empty stack
    pop(v, vc);
    `CHECK(v == STACK_SOS, "pop of empty stack gives start-of-stack")
    `CHECK(vc == 2, "pop data held two cycles")
    // push 40 values, pop them back
    for (int i = 0; i < 40; i++) begin
      vals[i] = 7'($urandom_range(0, 63));
      push(vals[i]);
    end
    for (int i = 39; i >= 20; i--) begin
      pop(v, vc);
      `CHECK(v == vals[i], $sformatf("pop %0d: got %0d want %0d", i, v, vals[i]))
    end
    // interleave: push two more, pop them, then the rest
    push(7'd5); push(7'd9);
    pop(v, vc); `CHECK(v == 7'd9, "LIFO after refill (9)")
    pop(v, vc); `CHECK(v == 7'd5, "LIFO after refill (5)")
    for (int i = 19; i >= 0; i--) begin
      pop(v, vc);
      `CHECK(v == vals[i], $sformatf("pop %0d: got %0d want %0d", i, v, vals[i]))
    end
    pop(v, vc); `CHECK(v == STACK_SOS, "empty again")
    pop(v, vc); `CHECK(v == STACK_SOS, "start-of-stack is not popped past")
    push(7'd33);
    pop(v, vc); `CHECK(v == 7'd33, "push after empty pops")
    // push timing: busy for exactly three cycles after the command is seen
    @(negedge clk);
    cmd = 2'd2; push_data = 7'd1;
    begin
      int nb;
      nb = 0;
      for (int k = 0; k < 6; k++) begin
        @(negedge clk);
        if (k == 2) cmd = 2'd0;
        if (busy) nb++;
      end
      `CHECK(nb == 3, "push takes three cycles")
    end
    `TB_END
  end
endmodule
