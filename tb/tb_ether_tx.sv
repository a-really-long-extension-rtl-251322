// tb_ether_tx: steps ether_tx through its 22 bytes with irregular next
// strobes and compares them with preamble, SFD, MAC addresses and
// EtherType built by the reference model; last_o must mark byte 22 only.
`include "tb_common.svh"
module tb_ether_tx;
  import tb_net_pkg::*;
  `TB_DECLS
  localparam logic [47:0] D = 48'h0A1B_2C3D_4E5F, S = 48'h0200_0000_0001;
  logic clk = 0, rst = 1, start = 0, next = 0, last_o;
  logic [7:0] byte_o;
  always #10 clk = ~clk;
  ether_tx #(.DST_MAC(D), .SRC_MAC(S)) dut (.clk, .rst, .start, .next, .byte_o, .last_o);
  initial begin repeat (10000) @(posedge clk); failures++; `TB_FINISH end
  initial begin
    bq_t exp, f;
    f = eth_frame(D, S, exp);
    exp.delete();
    repeat (7) exp.push_back(8'h55);
    exp.push_back(8'hD5);
    for (int i = 0; i < 14; i++) exp.push_back(f[i]);
    repeat (2) @(posedge clk); rst <= 0;
    for (int r = 0; r < 3; r++) begin
      @(posedge clk); start <= 1; @(posedge clk); start <= 0;
      foreach (exp[i]) begin
        @(negedge clk);
        `CHECK(byte_o == exp[i], $sformatf("byte %0d %h vs %h", i, byte_o, exp[i]))
        `CHECK(last_o == (i == 21), $sformatf("last at %0d", i))
        @(posedge clk); next <= 1; @(posedge clk); next <= 0;
        repeat ($urandom_range(0, 3)) @(posedge clk);
      end
    end
    `TB_FINISH
  end
endmodule
