// tb_video_ram: writes random bytes on port A while port B reads random
// addresses, checking one-cycle reads of what was written earlier.
`include "tb_common.svh"
module tb_video_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        we_a = 0;
  logic [15:0] addr_a = 0, addr_b = 0;
  logic [7:0]  wdata_a = 0, rdata_b;

  video_ram dut (.*);
  logic [7:0] ref_mem [60000];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    for (int i = 0; i < 60000; i++) begin
      @(negedge clk); we_a = 1; addr_a = 16'(i); wdata_a = 8'($urandom); ref_mem[i] = wdata_a;
    end
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      we_a = $urandom_range(0, 1); addr_a = 16'($urandom_range(0, 59999)); wdata_a = 8'($urandom);
      addr_b = (t % 3 == 0) ? addr_a : 16'($urandom_range(0, 59999));
      @(posedge clk); #1;
      `CHECK(rdata_b == ref_mem[addr_b], "port B reads the stored byte")
      if (we_a) ref_mem[addr_a] = wdata_a;
    end
    `TB_END
  end
endmodule
