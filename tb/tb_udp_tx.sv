// tb_udp_tx: steps udp_tx through its 8 header bytes and compares them with
// the reference UDP header (ports, 8 + data length, checksum as given);
// in_csum must mark bytes 6 and 7, last_o byte 7.
`include "tb_common.svh"
module tb_udp_tx;
  import tb_net_pkg::*;
  `TB_DECLS
  logic clk = 0, rst = 1, start = 0, next = 0, last_o, in_csum;
  logic [15:0] data_bytes = 0, csum = 0;
  logic [7:0] byte_o;
  always #10 clk = ~clk;
  udp_tx #(.SRC_PORT(16'd5000), .DST_PORT(16'd6001)) dut (.clk, .rst, .start, .next, .data_bytes, .csum,
                                                          .byte_o, .last_o, .in_csum);
  initial begin repeat (20000) @(posedge clk); failures++; `TB_FINISH end
  initial begin
    bq_t d, exp;
    repeat (2) @(posedge clk); rst <= 0;
    for (int r = 0; r < 8; r++) begin
      d.delete(); repeat ($urandom_range(0, 640)) d.push_back(8'($urandom));
      exp = ip_udp(32'h1, 32'h2, 16'h0, d, .sport(16'd5000), .dport(16'd6001));
      exp = exp[20:27];
      @(posedge clk); start <= 1; data_bytes <= 16'(d.size()); csum <= {exp[6], exp[7]};
      @(posedge clk); start <= 0;
      for (int i = 0; i < 8; i++) begin
        @(negedge clk);
        `CHECK(byte_o == exp[i], $sformatf("r=%0d byte %0d %h vs %h", r, i, byte_o, exp[i]))
        `CHECK(in_csum == (i >= 6) && last_o == (i == 7), $sformatf("flags at %0d", i))
        @(posedge clk); next <= 1; @(posedge clk); next <= 0;
      end
    end
    `TB_FINISH
  end
endmodule
