// tb_ip_ck_sum: feeds the first ten bytes of reference IPv4 headers (one
// byte every four cycles, as on the wire) and checks that csum equals the
// checksum the reference computed over the whole header, one cycle after
// the tenth byte.
`include "tb_common.svh"
module tb_ip_ck_sum;
  import tb_net_pkg::*;
  `TB_DECLS
  localparam logic [31:0] SIP = 32'hC0A8_0105, DIP = 32'h8D2C_11FE;
  logic clk = 0, rst = 1, start = 0, take = 0;
  logic [7:0] byte_i = 0;
  logic [15:0] csum;
  always #10 clk = ~clk;
  ip_ck_sum #(.SRC_IP(SIP), .DST_IP(DIP)) dut (.clk, .rst, .start, .take, .byte_i, .csum);
  initial begin repeat (20000) @(posedge clk); failures++; `TB_FINISH end
  initial begin
    bq_t d, h;
    repeat (2) @(posedge clk); rst <= 0;
    for (int r = 0; r < 30; r++) begin
      d.delete(); repeat ($urandom_range(0, 540)) d.push_back(8'h00);
      h = ip_udp(SIP, DIP, 16'($urandom), d);
      @(posedge clk); start <= 1; @(posedge clk); start <= 0;
      for (int i = 0; i < 10; i++) begin
        @(posedge clk); take <= 1; byte_i <= h[i];
        @(posedge clk); take <= 0; repeat (2) @(posedge clk);
      end
      `CHECK(csum == {h[10], h[11]}, $sformatf("r=%0d csum %h vs %h", r, csum, {h[10], h[11]}))
    end
    `TB_FINISH
  end
endmodule
