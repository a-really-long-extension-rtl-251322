// tb_data_ck_sum: random word streams; sum must equal the reference one's
// complement sum of the words and bytes twice their count, after clear.
`include "tb_common.svh"
module tb_data_ck_sum;
  import tb_net_pkg::*;
  `TB_DECLS
  logic clk = 0, rst = 1, clear = 0, axiiv = 0;
  logic [15:0] axiid = 0, sum, bytes;
  always #10 clk = ~clk;
  data_ck_sum dut (.clk, .rst, .clear, .axiiv, .axiid, .sum, .bytes);
  initial begin repeat (100000) @(posedge clk); failures++; `TB_FINISH end
  initial begin
    logic [15:0] w[$];
    bit [15:0] s;
    repeat (2) @(posedge clk); rst <= 0;
    for (int r = 0; r < 20; r++) begin
      w.delete(); repeat ($urandom_range(1, 320)) w.push_back((r == 0) ? 16'hFFFF : 16'($urandom));
      @(posedge clk); clear <= 1; @(posedge clk); clear <= 0;
      foreach (w[i]) begin
        @(posedge clk); axiiv <= 1; axiid <= w[i];
        @(posedge clk); axiiv <= ($urandom_range(0, 1) == 0) ? 1'b0 : 1'b0;
      end
      @(posedge clk);
      s = ones_sum(words_to_bytes(w));
      // 0x0000 and 0xFFFF are the same value in one's complement
      `CHECK(sum == s || (sum == 16'hFFFF && s == 16'h0000) || (sum == 16'h0000 && s == 16'hFFFF),
             $sformatf("r=%0d sum %h vs %h", r, sum, s))
      `CHECK(bytes == 16'(2 * w.size()), "byte count")
    end
    `TB_FINISH
  end
endmodule
