// n_fpga: the FPGA beside the NES console.
//
// Video: 16-bit camera pixels are collected line by line in the ping-pong
// linebuffer (camera clock) and each full 320-pixel line is sent, as one
// UDP datagram of 320 words, by the transmitting network stack to the
// remote FPGA (Ethernet clock, 2-bit RMII).
// Controller: the receiving network stack delivers the remote FPGA's
// controller datagrams; ctrl_rx_check keeps the button state of every word
// whose two copies agree, and nes_ctrl_emulator answers the console's latch
// and pulse lines with that state.
// Status outputs expose the drop and error counters.
module n_fpga #(
  parameter int          N      = 2,
  parameter int          WIDTH  = 320,
  parameter int          DEPTH  = 320,
  parameter logic [31:0] MY_IP  = 32'h0A000001,
  parameter logic [31:0] PEER_IP = 32'h0A000002,
  parameter logic [47:0] MY_MAC = 48'h0200_0000_0001
) (
  input  logic         cam_clk,
  input  logic         cam_rst,
  input  logic         cam_pix_valid,
  input  logic [15:0]  cam_pix,
  input  logic         clk,
  input  logic         rst,
  input  logic         eth_crsdv,
  input  logic [N-1:0] eth_rxd,
  output logic         eth_txen,
  output logic [N-1:0] eth_txd,
  input  logic         nes_latch,
  input  logic         nes_pulse,
  output logic         nes_data,
  output logic [7:0]   buttons,
  output logic [15:0]  lines_dropped,
  output logic [15:0]  frames_ok,
  output logic [15:0]  frames_bad,
  output logic [15:0]  ctrl_accepted,
  output logic [15:0]  ctrl_rejected
);
  logic        lb_v, lb_last, tx_ready;
  logic [15:0] lb_d;
  logic        rx_v;
  logic [15:0] rx_d;

  linebuffer #(.WIDTH(WIDTH), .PW(16)) u_lb (
    .cam_clk, .cam_rst, .pix_valid(cam_pix_valid), .pix(cam_pix), .lines_dropped,
    .clk, .rst, .ready(tx_ready), .axiov(lb_v), .axiod(lb_d), .axio_last(lb_last)
  );

  net_tx #(.N(N), .DEPTH(DEPTH), .SRC_MAC(MY_MAC), .SRC_IP(MY_IP), .DST_IP(PEER_IP)) u_tx (
    .clk, .rst, .axiiv(lb_v), .axiid(lb_d), .axii_last(lb_last), .ready(tx_ready),
    .eth_txen, .eth_txd
  );

  net_rx #(.N(N), .MY_IP(MY_IP), .DEPTH(DEPTH)) u_rx (
    .clk, .rst, .eth_crsdv, .eth_rxd, .axiov(rx_v), .axiod(rx_d),
    .frames_ok, .frames_bad, .src_ip()
  );

  ctrl_rx_check u_chk (
    .clk, .rst, .axiiv(rx_v), .axiid(rx_d), .buttons,
    .accepted(ctrl_accepted), .rejected(ctrl_rejected)
  );

  nes_ctrl_emulator u_emu (
    .clk, .rst, .buttons, .nes_latch, .nes_pulse, .nes_data
  );
endmodule
