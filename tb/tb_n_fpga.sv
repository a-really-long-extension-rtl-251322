// tb_n_fpga: the NES-side FPGA alone. Three camera lines must leave the
// RMII port as three frames identical to the reference (broadcast MAC,
// 10.0.0.1 -> 10.0.0.2, identification 1..3, 640 data bytes each).
// Controller datagrams sent in over RMII must reach the console: a console
// model reads the data line and must see the state of the last good
// datagram; a datagram whose two copies differ is rejected, one with a bad
// FCS is discarded, and neither changes what the console reads.
`include "tb_common.svh"
module tb_n_fpga;
  import tb_net_pkg::*;
  `TB_DECLS
  localparam logic [31:0] NIP = 32'h0A000001, RIP = 32'h0A000002;
  localparam logic [47:0] NMAC = 48'h0200_0000_0001;
  logic cam_clk = 0, cam_rst = 1, clk = 0, rst = 1, pix_valid = 0;
  logic [15:0] pix = 0;
  logic crsdv, txen, nes_latch = 0, nes_pulse = 1, nes_data;
  logic [1:0] rxd, txd;
  logic [7:0] buttons;
  logic [15:0] lines_dropped, frames_ok, frames_bad, acc, rej;
  always #30 cam_clk = ~cam_clk;
  always #10 clk = ~clk;

  n_fpga dut (.cam_clk, .cam_rst, .cam_pix_valid(pix_valid), .cam_pix(pix), .clk, .rst,
    .eth_crsdv(crsdv), .eth_rxd(rxd), .eth_txen(txen), .eth_txd(txd),
    .nes_latch, .nes_pulse, .nes_data, .buttons, .lines_dropped, .frames_ok, .frames_bad,
    .ctrl_accepted(acc), .ctrl_rejected(rej));
  rmii_bfm bfm (.clk, .crsdv, .rxd, .txen, .txd);

  initial begin #20ms; failures++; $display("watchdog"); `TB_FINISH end

  task automatic console_read(output logic [7:0] s);
    #1us nes_latch = 1; #12us nes_latch = 0; #6us;
    for (int k = 0; k < 8; k++) begin
      nes_pulse = 0; #3us s[7 - k] = nes_data; #3us nes_pulse = 1; #6us;
    end
  endtask

  function automatic bq_t ctrl_frame(logic [7:0] a, logic [7:0] b, int id);
    bq_t d;
    d.push_back(a); d.push_back(b);
    return eth_frame(48'hFFFF_FFFF_FFFF, 48'h0200_0000_0002, ip_udp(RIP, NIP, 16'(id), d));
  endfunction

  initial begin
    logic [15:0] lines[3][$];
    logic [7:0] s;
    bq_t f;
    repeat (4) @(posedge cam_clk); cam_rst <= 0; rst <= 0;
    bfm.clear();
    fork
      begin // camera
        for (int l = 0; l < 3; l++) begin
          for (int i = 0; i < 320; i++) begin
            automatic logic [15:0] p = 16'($urandom);
            @(posedge cam_clk); pix_valid <= 1; pix <= p; lines[l].push_back(p);
          end
          @(posedge cam_clk); pix_valid <= 0;
          repeat (1500) @(posedge cam_clk);
        end
      end
      begin // controller datagrams from the remote side
        repeat (100) @(posedge clk);
        bfm.send(ctrl_frame(8'h81, 8'h81, 1));
        console_read(s);
        `CHECK(s == 8'h81 && buttons == 8'h81, $sformatf("console read %h", s))
        bfm.send(ctrl_frame(8'h44, 8'h45, 2));          // copies differ
        f = ctrl_frame(8'h33, 8'h33, 3); f[50] ^= 8'h01; // FCS error
        bfm.send(f);
        console_read(s);
        `CHECK(s == 8'h81, $sformatf("bad datagrams changed state %h", s))
        bfm.send(ctrl_frame(8'h5A, 8'h5A, 4));
        console_read(s);
        `CHECK(s == 8'h5A, $sformatf("console read %h", s))
      end
    join
    repeat (8000) @(posedge clk);
    `CHECK(bfm.frames.size() == 3, $sformatf("frames %0d", bfm.frames.size()))
    for (int l = 0; l < 3 && l < bfm.frames.size(); l++) begin
      f = eth_frame(48'hFFFF_FFFF_FFFF, NMAC, ip_udp(NIP, RIP, 16'(l + 1), words_to_bytes(lines[l])));
      `CHECK(bfm.frames[l] == f, $sformatf("frame %0d (%0d bytes) differs from reference", l, bfm.frames[l].size()))
    end
    `CHECK(acc == 16'd2 && rej == 16'd1 && frames_bad == 16'd1, $sformatf("acc %0d rej %0d bad %0d", acc, rej, frames_bad))
    `CHECK(lines_dropped == 0, "line dropped")
    `TB_FINISH
  end
endmodule
