// tb_sp_ram: writes random words to random addresses of a 64 x 64 RAM and
// a 112 x 7 RAM and checks that reads return the last word written, one
// cycle after the address.
`include "tb_common.svh"
module tb_sp_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        we = 0;
  logic [5:0]  addr = 0;
  logic [63:0] wdata = 0, rdata;
  logic        we2 = 0;
  logic [6:0]  addr2 = 0, wdata2 = 0, rdata2;

  sp_ram #(.WIDTH(64), .DEPTH(64)) dut (.clk, .we, .addr, .wdata, .rdata);
  sp_ram #(.WIDTH(7), .DEPTH(112)) dut2 (.clk, .we(we2), .addr(addr2), .wdata(wdata2), .rdata(rdata2));

  logic [63:0] ref1 [64];
  logic [6:0]  ref2 [112];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); we = 1; addr = 6'(i); wdata = {$urandom, $urandom}; ref1[i] = wdata;
    end
    for (int i = 0; i < 112; i++) begin
      @(negedge clk); we2 = 1; addr2 = 7'(i); wdata2 = 7'($urandom); ref2[i] = wdata2;
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); addr = 6'($urandom); wdata = {$urandom, $urandom};
      we2 = $urandom_range(0, 1); addr2 = 7'($urandom_range(0, 111)); wdata2 = 7'($urandom);
      @(posedge clk);
      #1;
      `CHECK(rdata == ref1[addr], "64x64 read returns stored word")
      `CHECK(rdata2 == ref2[addr2], "112x7 read returns stored word")
      if (we) ref1[addr] = wdata;
      if (we2) ref2[addr2] = wdata2;
    end
    `TB_END
  end
endmodule
