// tb_net_rx: the whole receive stack fed from the RMII model. Frames for
// this station must deliver their UDP data as 16-bit words; frames with a
// corrupted byte (FCS), another destination address or a bad IPv4 checksum
// must deliver nothing and be counted as bad. Short datagrams with Ethernet
// padding and 640-byte line datagrams are both used.
`include "tb_common.svh"
module tb_net_rx;
  import tb_net_pkg::*;
  `TB_DECLS
  localparam logic [31:0] ME = 32'h0A000002;
  logic clk = 0, rst = 1, crsdv, axiov;
  logic [1:0] rxd;
  logic [15:0] axiod, frames_ok, frames_bad;
  logic [31:0] src_ip;
  always #10 clk = ~clk;

  net_rx #(.N(2), .MY_IP(ME), .DEPTH(320)) dut (
    .clk, .rst, .eth_crsdv(crsdv), .eth_rxd(rxd), .axiov, .axiod, .frames_ok, .frames_bad, .src_ip);
  rmii_bfm bfm (.clk, .crsdv, .rxd, .txen(1'b0), .txd(2'b00));

  logic [15:0] got[$];
  always @(posedge clk) if (axiov) got.push_back(axiod);

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  initial begin
    logic [15:0] w[$];
    bq_t f;
    int nbad = 0, ngood = 0;
    repeat (3) @(posedge clk); rst <= 0;
    for (int t = 0; t < 14; t++) begin
      automatic int kind = (t < 8) ? 0 : t - 7;
      w.delete();
      repeat ((t % 2) ? 320 : $urandom_range(1, 12)) w.push_back(16'($urandom));
      unique case (kind)
        2: f = eth_frame(48'hFFFF_FFFF_FFFF, 48'h1, ip_udp(32'h0A000001, 32'h0A000007, 16'(t), words_to_bytes(w)));
        3: f = eth_frame(48'hFFFF_FFFF_FFFF, 48'h1, ip_udp(32'h0A000001, ME, 16'(t), words_to_bytes(w), .bad_csum(1'b1)));
        default: f = eth_frame(48'hFFFF_FFFF_FFFF, 48'h1, ip_udp(32'h0A000001, ME, 16'(t), words_to_bytes(w)));
      endcase
      if (kind == 1 || kind == 4) f[$urandom_range(14, f.size() - 1)] ^= 8'h04;
      got.delete();
      bfm.send(f, 400);
      if (kind == 0 || kind > 4) begin
        ngood++;
        `CHECK(got == w, $sformatf("t=%0d words %0d vs %0d", t, got.size(), w.size()))
      end else begin
        nbad++;
        `CHECK(got.size() == 0, $sformatf("t=%0d kind %0d delivered", t, kind))
      end
    end
    `CHECK(frames_ok == 16'(ngood) && frames_bad == 16'(nbad), $sformatf("counters %0d %0d", frames_ok, frames_bad))
    `TB_FINISH
  end
endmodule
