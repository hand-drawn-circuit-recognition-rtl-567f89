// tb_serial_export: the UART sender with a short bit time (CLKS_PER_BIT =
// 16). A behavioural spice RAM (registered read) holds random printable
// text, line feeds and the end-of-file code 8'h04. Checks: nothing is
// sent while text_ready is low, even after `start`; after text_ready and
// `start` every byte before the end-of-file code arrives as an 8N1 frame
// of exactly 16 cycles per bit (decoded here), the end-of-file code is not
// sent, `busy` covers the transfer and the line idles high. Two texts are
// sent, the second shorter than the first.
`include "tb_common.svh"
module tb_serial_export;
  localparam int CPB = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start = 0, text_ready = 0, tx, busy;
  logic [10:0] ser_addr;
  logic [7:0]  ser_data;
  serial_export #(.CLKS_PER_BIT(CPB), .TW(11)) dut (.clk, .rst, .start, .text_ready, .ser_addr,
                                                    .ser_data, .tx, .busy);
  logic [7:0] text [2048];
  always_ff @(posedge clk) ser_data <= text[ser_addr];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  logic [7:0] rx [$];
  int         bad_frames = 0;
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge tx);
      repeat (CPB / 2) @(posedge clk);
      for (int k = 0; k < 8; k++) begin
        repeat (CPB) @(posedge clk);
        b[k] = tx;
      end
      repeat (CPB) @(posedge clk);
      if (!tx) bad_frames++;
      rx.push_back(b);
    end
  end

  initial begin
    int lens [2] = '{40, 13};
    for (int k = 0; k < 2048; k++) text[k] = 8'h20;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    repeat (20 * CPB) @(negedge clk);
    `CHECK(rx.size() == 0 && tx, "nothing sent without text_ready")
    for (int n = 0; n < 2; n++) begin
      for (int k = 0; k < lens[n]; k++)
        text[k] = (k % 11 == 10) ? 8'h0A : 8'(32 + $urandom_range(0, 94));
      text[lens[n]] = 8'h04;
      text_ready = 1;
      rx.delete();
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      @(negedge clk);
      `CHECK(busy, "busy while sending")
      repeat ((lens[n] + 2) * 10 * CPB + 50) @(negedge clk);
      `CHECK(!busy && tx, "idle high after the text")
      `CHECK(rx.size() == lens[n], $sformatf("text %0d: %0d bytes received, %0d sent", n, rx.size(),
                                             lens[n]))
      for (int k = 0; k < lens[n] && k < rx.size(); k++)
        `CHECK(rx[k] == text[k], $sformatf("byte %0d: %h, expected %h", k, rx[k], text[k]))
    end
    `CHECK(bad_frames == 0, $sformatf("%0d frames without a stop bit", bad_frames))
    `TB_END
  end
endmodule
