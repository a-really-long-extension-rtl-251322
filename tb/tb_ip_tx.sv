// tb_ip_tx: steps ip_tx through a header with a given checksum input and
// compares every byte with the reference header (length 28 + data, DF set,
// TTL 64, UDP, addresses, identification counting up per packet). in_csum
// must mark bytes 10 to 19 and last_o byte 19.
`include "tb_common.svh"
module tb_ip_tx;
  import tb_net_pkg::*;
  `TB_DECLS
  localparam logic [31:0] SIP = 32'hC0A8_0105, DIP = 32'h0A00_0002;
  logic clk = 0, rst = 1, start = 0, next = 0, last_o, in_csum;
  logic [15:0] data_bytes = 0, csum = 0;
  logic [7:0] byte_o;
  always #10 clk = ~clk;
  ip_tx #(.SRC_IP(SIP), .DST_IP(DIP)) dut (.clk, .rst, .start, .next, .data_bytes, .csum,
                                          .byte_o, .last_o, .in_csum);
  initial begin repeat (20000) @(posedge clk); failures++; `TB_FINISH end
  initial begin
    bq_t d, exp;
    repeat (2) @(posedge clk); rst <= 0;
    for (int r = 1; r <= 5; r++) begin
      d.delete(); repeat ($urandom_range(0, 600)) d.push_back(8'h00);
      exp = ip_udp(SIP, DIP, 16'(r), d);
      @(posedge clk); start <= 1; data_bytes <= 16'(d.size()); csum <= {exp[10], exp[11]};
      @(posedge clk); start <= 0;
      for (int i = 0; i < 20; i++) begin
        @(negedge clk);
        `CHECK(byte_o == exp[i], $sformatf("r=%0d byte %0d %h vs %h", r, i, byte_o, exp[i]))
        `CHECK(in_csum == (i >= 10) && last_o == (i == 19), $sformatf("flags at %0d", i))
        @(posedge clk); next <= 1; @(posedge clk); next <= 0;
      end
    end
    `TB_FINISH
  end
endmodule
