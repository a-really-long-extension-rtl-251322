// tb_data_store: writes datagrams of random words (up to the 320-word
// depth, and one over it) and reads them back with next strobes every
// four cycles, checking the bytes come high byte first, last_o is on the
// final byte only, words counts what was stored and extra words are lost.
`include "tb_common.svh"
module tb_data_store;
  `TB_DECLS
  logic clk = 0, rst = 1, clear = 0, axiiv = 0, rd_start = 0, next = 0, last_o;
  logic [15:0] axiid = 0, words;
  logic [7:0] byte_o;
  always #10 clk = ~clk;
  data_store #(.DEPTH(320)) dut (.clk, .rst, .clear, .axiiv, .axiid, .rd_start, .next,
                                 .byte_o, .last_o, .words);
  initial begin repeat (100000) @(posedge clk); failures++; `TB_FINISH end
  initial begin
    logic [15:0] w[$];
    int n;
    repeat (2) @(posedge clk); rst <= 0;
    for (int r = 0; r < 6; r++) begin
      n = (r == 0) ? 321 : (r == 1) ? 1 : $urandom_range(1, 320);
      w.delete(); repeat (n) w.push_back(16'($urandom));
      @(posedge clk); clear <= 1; @(posedge clk); clear <= 0;
      foreach (w[i]) begin @(posedge clk); axiiv <= 1; axiid <= w[i]; end
      @(posedge clk); axiiv <= 0;
      @(posedge clk);
      if (n > 320) n = 320;
      `CHECK(words == 16'(n), $sformatf("r=%0d words %0d n %0d", r, words, n))
      @(posedge clk); rd_start <= 1; @(posedge clk); rd_start <= 0;
      for (int i = 0; i < 2 * n; i++) begin
        repeat (2) @(posedge clk);
        @(negedge clk);
        `CHECK(byte_o == (i % 2 ? w[i/2][7:0] : w[i/2][15:8]), $sformatf("r=%0d byte %0d", r, i))
        `CHECK(last_o == (i == 2 * n - 1), $sformatf("r=%0d last at %0d", r, i))
        @(posedge clk); next <= 1; @(posedge clk); next <= 0;
      end
    end
    `TB_FINISH
  end
endmodule
