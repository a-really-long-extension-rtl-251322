// tb_r_fpga: the remote FPGA alone, with the controller poll sped up
// (CLK_HZ = 1 MHz, POLL_HZ = 1000, so 6 us = 6 cycles).
// Video: two line datagrams are sent in over RMII; the VGA output is then
// watched over a whole screen refresh and every pixel of the first two
// picture lines must show the 12-bit colour of the 16-bit pixel sent,
// with black to the right of the picture.
// Controller: after the controller model's state changes, exactly 20
// frames must leave the RMII port, each identical to the reference frame
// carrying {state, state}.
`include "tb_common.svh"
module tb_r_fpga;
  import tb_net_pkg::*;
  `TB_DECLS
  localparam logic [31:0] NIP = 32'h0A000001, RIP = 32'h0A000002;
  localparam logic [47:0] RMAC = 48'h0200_0000_0002;
  logic clk = 0, rst = 1, vga_clk = 0, vga_rst = 1;
  logic crsdv, txen, ctrl_latch, ctrl_pulse, ctrl_data, hs, vs;
  logic [1:0] rxd, txd;
  logic [3:0] r, g, b;
  logic [7:0] buttons, pressed = 8'h00;
  logic [15:0] frames_ok, frames_bad, ctrl_sent;
  always #10 clk = ~clk;
  always #7.692 vga_clk = ~vga_clk;

  r_fpga #(.CLK_HZ(1_000_000), .POLL_HZ(1000)) dut (.clk, .rst, .vga_clk, .vga_rst,
    .eth_crsdv(crsdv), .eth_rxd(rxd), .eth_txen(txen), .eth_txd(txd),
    .ctrl_latch, .ctrl_pulse, .ctrl_data, .vga_r(r), .vga_g(g), .vga_b(b), .vga_hs(hs), .vga_vs(vs),
    .buttons, .frames_ok, .frames_bad, .ctrl_sent);
  rmii_bfm bfm (.clk, .crsdv, .rxd, .txen, .txd);
  nes_controller_model ctl (.latch(ctrl_latch), .pulse(ctrl_pulse), .pressed, .data(ctrl_data));

  // VGA checker: output is one cycle behind the counters
  logic [15:0] lines[2][$];
  bit vga_check = 0;
  int vga_checked, vga_bad;
  logic [10:0] hq;
  logic [9:0] vq;
  always @(posedge vga_clk) begin
    if (vga_check && vq < 2 && hq < 11'd400) begin
      automatic logic [11:0] e = 12'h000;
      if (hq < 320) e = {lines[vq][hq][15:12], lines[vq][hq][10:7], lines[vq][hq][4:1]};
      vga_checked++;
      if ({r, g, b} != e) vga_bad++;
    end
    hq <= dut.u_vga.hcount; vq <= dut.u_vga.vcount;
  end

  initial begin #40ms; failures++; $display("watchdog"); `TB_FINISH end

  initial begin
    bq_t f;
    repeat (4) @(posedge clk); rst <= 0; vga_rst <= 0;
    bfm.clear();
    for (int l = 0; l < 2; l++) begin
      repeat (320) lines[l].push_back(16'($urandom));
      bfm.send(eth_frame(48'hFFFF_FFFF_FFFF, 48'h0200_0000_0001, ip_udp(NIP, RIP, 16'(l), words_to_bytes(lines[l]))), 100);
    end
    repeat (500) @(posedge clk);
    `CHECK(frames_ok == 16'd2 && frames_bad == 16'd0, $sformatf("frames ok %0d bad %0d", frames_ok, frames_bad))
    // wait for the next screen refresh and check its first two lines
    wait (dut.u_vga.vcount == 10'd100);
    wait (dut.u_vga.vcount == 10'd0);
    vga_check = 1;
    wait (dut.u_vga.vcount == 10'd3);
    vga_check = 0;
    `CHECK(vga_checked == 800 && vga_bad == 0, $sformatf("vga checked %0d bad %0d", vga_checked, vga_bad))
    // controller: first poll reports the idle state, then change it
    bfm.clear();
    pressed = 8'hA5;
    repeat (12000) @(posedge clk);
    `CHECK(buttons == 8'hA5, $sformatf("buttons %h", buttons))
    `CHECK(ctrl_sent == 16'd40, $sformatf("sent %0d", ctrl_sent))
    begin
      bq_t d;
      int n = 0;
      d.push_back(8'hA5); d.push_back(8'hA5);
      foreach (bfm.frames[i]) begin
        f = eth_frame(48'hFFFF_FFFF_FFFF, RMAC, ip_udp(RIP, NIP, 16'(21 + n), d));
        if (bfm.frames[i] == f) n++;
      end
      `CHECK(n == 20, $sformatf("matching controller frames %0d of %0d", n, bfm.frames.size()))
    end
    `TB_FINISH
  end
endmodule
