// tb_net_tx: the whole transmit stack. Datagrams of random 16-bit words
// (1 to 320 words, with random pauses in axiiv) are written while ready is
// high; the RMII model captures each frame, and it is compared byte for
// byte, FCS included, with the frame the reference model builds (IPv4
// identification counting 1, 2, ...). Also checked: txen stays high for
// the whole frame (preamble to FCS, no gaps), the frame starts within a
// fixed 5 cycles of the last word, and ready returns only after the 48-cycle
// inter-frame gap.
`include "tb_common.svh"
module tb_net_tx;
  import tb_net_pkg::*;
  `TB_DECLS
  localparam logic [47:0] DMAC = 48'hFFFF_FFFF_FFFF, SMAC = 48'h0200_0000_0001;
  localparam logic [31:0] SIP = 32'h0A000001, DIP = 32'h0A000002;
  logic clk = 0, rst = 1, axiiv = 0, axii_last = 0, ready, txen;
  logic [15:0] axiid = 0;
  logic [1:0] txd, rxd_unused;
  logic crsdv_unused;
  always #10 clk = ~clk;

  net_tx #(.N(2), .DEPTH(320), .DST_MAC(DMAC), .SRC_MAC(SMAC), .SRC_IP(SIP), .DST_IP(DIP)) dut (
    .clk, .rst, .axiiv, .axiid, .axii_last, .ready, .eth_txen(txen), .eth_txd(txd));
  rmii_bfm bfm (.clk, .crsdv(crsdv_unused), .rxd(rxd_unused), .txen, .txd);

  int cyc, last_cyc, start_cyc, end_cyc, ready_cyc;
  logic txen_q, ready_q;
  always @(posedge clk) begin
    cyc++;
    txen_q <= txen; ready_q <= ready;
    if (txen && !txen_q) start_cyc = cyc;
    if (!txen && txen_q) end_cyc = cyc;
    if (ready && !ready_q) ready_cyc = cyc;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  initial begin
    logic [15:0] w[$];
    bq_t exp;
    repeat (3) @(posedge clk); rst <= 0;
    bfm.clear();
    for (int t = 0; t < 10; t++) begin
      w.delete();
      repeat ((t == 0) ? 1 : (t == 1) ? 320 : $urandom_range(1, 320)) w.push_back(16'($urandom));
      wait (ready);
      foreach (w[i]) begin
        @(posedge clk);
        while (!ready) @(posedge clk);
        axiiv <= 1; axiid <= w[i]; axii_last <= (i == w.size() - 1);
        if ($urandom_range(0, 3) == 0 && i != w.size() - 1) begin
          @(posedge clk); axiiv <= 0; axii_last <= 0;
        end
      end
      @(posedge clk); axiiv <= 0; axii_last <= 0; last_cyc = cyc;
      wait (!ready);
      wait (ready);
      repeat (2) @(posedge clk);
      exp = eth_frame(DMAC, SMAC, ip_udp(SIP, DIP, 16'(t + 1), words_to_bytes(w)));
      `CHECK(bfm.frames.size() == t + 1, $sformatf("t=%0d frame count %0d", t, bfm.frames.size()))
      if (bfm.frames.size() == t + 1) begin
        `CHECK(bfm.sfd_ok[t], $sformatf("t=%0d preamble/SFD", t))
        `CHECK(bfm.frames[t] == exp, $sformatf("t=%0d frame mismatch %0d vs %0d bytes", t, bfm.frames[t].size(), exp.size()))
        `CHECK(bfm.txen_cycles[t] == (8 + exp.size()) * 4, $sformatf("t=%0d txen %0d cycles", t, bfm.txen_cycles[t]))
      end
      `CHECK(start_cyc - last_cyc == 5, $sformatf("t=%0d start delay %0d", t, start_cyc - last_cyc))
      `CHECK(ready_cyc - end_cyc >= 48, $sformatf("t=%0d gap %0d", t, ready_cyc - end_cyc))
    end
    `TB_FINISH
  end
endmodule
