// tb_transport_ck_sum: for random datagrams, loads the data sum and length,
// feeds the six port and length bytes and checks csum against the UDP
// checksum the reference computed over pseudo-header, header and data.
`include "tb_common.svh"
module tb_transport_ck_sum;
  import tb_net_pkg::*;
  `TB_DECLS
  localparam logic [31:0] SIP = 32'hC0A8_0105, DIP = 32'h8D2C_11FE;
  logic clk = 0, rst = 1, start = 0, take = 0;
  logic [7:0] byte_i = 0;
  logic [15:0] data_sum = 0, data_bytes = 0, csum;
  always #10 clk = ~clk;
  transport_ck_sum #(.SRC_IP(SIP), .DST_IP(DIP)) dut (.clk, .rst, .start, .take, .byte_i,
                                                       .data_sum, .data_bytes, .csum);
  initial begin repeat (40000) @(posedge clk); failures++; `TB_FINISH end
  initial begin
    bq_t d, p;
    repeat (2) @(posedge clk); rst <= 0;
    for (int r = 0; r < 40; r++) begin
      d.delete(); repeat (2 * $urandom_range(0, 320)) d.push_back(8'($urandom));
      p = ip_udp(SIP, DIP, 16'h0, d, .sport(16'($urandom)), .dport(16'($urandom)));
      @(posedge clk); start <= 1; data_sum <= ones_sum(d); data_bytes <= 16'(d.size());
      @(posedge clk); start <= 0;
      for (int i = 20; i < 26; i++) begin
        @(posedge clk); take <= 1; byte_i <= p[i];
        @(posedge clk); take <= 0; repeat (2) @(posedge clk);
      end
      `CHECK(csum == {p[26], p[27]}, $sformatf("r=%0d csum %h vs %h", r, csum, {p[26], p[27]}))
    end
    `TB_FINISH
  end
endmodule
