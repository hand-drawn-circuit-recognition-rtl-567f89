// tb_image_rom: loads a test image through the load port and reads it back
// on both read ports, checking the line-major word layout (word a = line
// a/8, pixels (a mod 8)*64.., bit 63 leftmost) against the bitmap.
`include "tb_common.svh"
module tb_image_rom;
  import tb_img_pkg::*;
  import hdcr_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        load_we = 0;
  logic [11:0] load_addr = 0, addr_a = 0, addr_b = 0;
  logic [63:0] load_data = 0, data_a, data_b;

  image_rom dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    clear();
    grid();
    draw_comp(2, 3, T_RES_H);
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk); load_we = 1; load_addr = 12'(a); load_data = rom_word(a);
    end
    @(negedge clk); load_we = 0;
    for (int t = 0; t < 3000; t++) begin
      int ya, xa;
      @(negedge clk);
      ya = $urandom_range(0, 511); xa = $urandom_range(0, 7);
      addr_a = 12'(ya * 8 + xa);
      addr_b = 12'($urandom_range(0, 4095));
      @(negedge clk);
      `CHECK(data_a[63] == img[ya][xa*64] && data_a[0] == img[ya][xa*64+63], "bit 63 is the leftmost pixel")
      `CHECK(data_b == rom_word(int'(addr_b)), "port B word")
    end
    `TB_END
  end
endmodule
