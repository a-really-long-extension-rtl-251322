// tb_ether_rx: sends Ethernet frames built by the reference model into
// ether_rx over 2-bit RMII and checks that exactly the bytes after the
// 14-byte header and before the FCS come out, that done pulses once per
// frame, and that kill is set for a corrupted byte, a corrupted FCS and a
// frame cut off mid-byte, and clear otherwise.
`include "tb_common.svh"
module tb_ether_rx;
  import tb_net_pkg::*;
  `TB_DECLS
  logic clk = 0, rst = 1;
  logic crsdv, axiov, done, kill;
  logic [1:0] rxd;
  logic [7:0] axiod;
  always #10 clk = ~clk;

  ether_rx #(.N(2)) dut (.clk, .rst, .crsdv, .rxd, .axiov, .axiod, .done, .kill);
  rmii_bfm bfm (.clk, .crsdv, .rxd, .txen(1'b0), .txd(2'b00));

  bq_t got;
  int  ndone, nkill;
  always @(posedge clk) begin
    if (axiov) got.push_back(axiod);
    if (done) begin ndone++; if (kill) nkill++; end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  initial begin
    bq_t pl, f, exp;
    repeat (3) @(posedge clk); rst <= 0;
    for (int t = 0; t < 12; t++) begin
      automatic int len = (t < 2) ? t * 10 : $urandom_range(1, 300);
      pl.delete();
      repeat (len) pl.push_back(8'($urandom));
      f = eth_frame(48'hFFFF_FFFF_FFFF, 48'h0200_0000_0001, pl);
      exp = f[14:f.size()-5];
      got.delete(); ndone = 0; nkill = 0;
      if (t % 4 == 3) begin
        f[$urandom_range(0, f.size()-1)] ^= 8'h10;   // corrupt one byte
        bfm.send(f);
        `CHECK(ndone == 1 && nkill == 1, $sformatf("t=%0d corrupted frame not killed", t))
      end else begin
        bfm.send(f);
        `CHECK(ndone == 1 && nkill == 0, $sformatf("t=%0d good frame killed (%0d,%0d)", t, ndone, nkill))
        `CHECK(got == exp, $sformatf("t=%0d payload mismatch %0d vs %0d bytes", t, got.size(), exp.size()))
      end
    end
    // frame cut off mid-byte: drop the last dibit
    begin
      bit [31:0] c;
      pl.delete(); repeat (50) pl.push_back(8'($urandom));
      f = eth_frame(48'h1, 48'h2, pl);
      ndone = 0; nkill = 0;
      @(posedge clk);
      for (int i = 0; i < 7; i++) for (int k = 0; k < 4; k++) begin @(posedge clk); bfm.crsdv <= 1; bfm.rxd <= 2'b01; end
      for (int k = 0; k < 4; k++) begin @(posedge clk); bfm.rxd <= 8'hD5 >> (2*k); end
      foreach (f[i]) for (int k = 0; k < 4; k++) if (!(i == f.size()-1 && k == 3)) begin @(posedge clk); bfm.rxd <= f[i][2*k +: 2]; end
      @(posedge clk); bfm.crsdv <= 0;
      repeat (10) @(posedge clk);
      `CHECK(ndone == 1 && nkill == 1, "partial byte not killed")
      c = 0;
    end
    `TB_FINISH
  end
endmodule
