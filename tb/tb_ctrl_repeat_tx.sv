// tb_ctrl_repeat_tx: after each change exactly 20 one-word datagrams
// {state, state} must be handed over (axio_last with each), with ready
// toggled at random; a change in the middle of a burst restarts it.
`include "tb_common.svh"
module tb_ctrl_repeat_tx;
  `TB_DECLS
  logic clk = 0, rst = 1, changed = 0, ready = 0, axiov, axio_last;
  logic [7:0] buttons = 0;
  logic [15:0] axiod, sent;
  always #10 clk = ~clk;
  ctrl_repeat_tx #(.COPIES(20)) dut (.clk, .rst, .buttons, .changed, .ready, .axiov, .axiod, .axio_last, .sent);
  logic [15:0] got[$];
  int bad_last;
  always @(posedge clk) begin
    ready <= ($urandom_range(0, 2) == 0);
    if (axiov && ready) begin got.push_back(axiod); if (!axio_last) bad_last++; end
  end
  initial begin repeat (20000) @(posedge clk); failures++; `TB_FINISH end
  initial begin
    logic [7:0] s;
    repeat (2) @(posedge clk); rst <= 0;
    for (int r = 0; r < 5; r++) begin
      s = 8'($urandom);
      got.delete();
      @(posedge clk); changed <= 1; buttons <= s; @(posedge clk); changed <= 0;
      repeat (300) @(posedge clk);
      `CHECK(got.size() == 20, $sformatf("r=%0d copies %0d", r, got.size()))
      foreach (got[i]) `CHECK(got[i] == {s, s}, "word")
    end
    // restart in the middle of a burst
    got.delete();
    @(posedge clk); changed <= 1; buttons <= 8'h11; @(posedge clk); changed <= 0;
    wait (got.size() == 5);
    @(posedge clk); changed <= 1; buttons <= 8'h22; @(posedge clk); changed <= 0;
    repeat (300) @(posedge clk);
    `CHECK(got.size() >= 25 && got.size() <= 26 && got[got.size()-1] == 16'h2222, $sformatf("restart %0d", got.size()))
    `CHECK(bad_last == 0 && sent == 16'(100 + got.size()), $sformatf("sent %0d", sent))
    `TB_FINISH
  end
endmodule
