// tb_ctrl_rx_check: words whose two bytes agree must update the held
// state on the next edge; words with differing bytes must leave it alone.
// Both counters are checked.
`include "tb_common.svh"
module tb_ctrl_rx_check;
  `TB_DECLS
  logic clk = 0, rst = 1, axiiv = 0;
  logic [15:0] axiid = 0, accepted, rejected;
  logic [7:0] buttons;
  always #10 clk = ~clk;
  ctrl_rx_check dut (.clk, .rst, .axiiv, .axiid, .buttons, .accepted, .rejected);
  initial begin repeat (20000) @(posedge clk); failures++; `TB_FINISH end
  initial begin
    logic [7:0] held = 0, a, b;
    int na = 0, nr = 0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int i = 0; i < 200; i++) begin
      a = 8'($urandom);
      b = ($urandom_range(0, 2) == 0) ? a ^ (8'd1 << $urandom_range(0, 7)) : a;
      @(posedge clk); axiiv <= 1; axiid <= {a, b};
      @(posedge clk); axiiv <= 0;
      @(negedge clk);
      if (a == b) begin held = a; na++; end else nr++;
      `CHECK(buttons == held, $sformatf("i=%0d held %h vs %h", i, buttons, held))
    end
    `CHECK(accepted == 16'(na) && rejected == 16'(nr), "counters")
    `TB_FINISH
  end
endmodule
