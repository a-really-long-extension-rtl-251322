// nes_link_top: the complete remote-play link, both FPGAs side by side.
//
// n_fpga sits next to the NES console (camera in, controller emulation
// out) and r_fpga next to the player (controller in, VGA out). They talk
// only through their 2-bit RMII Ethernet ports, which are brought out here
// because the network between them (a direct cable or routed IPv4) is not
// part of the design: connect n_eth_tx* to r_eth_rx* and r_eth_tx* to
// n_eth_rx* for a direct link. The video stream goes N -> R as one UDP
// datagram per 320-pixel line; the controller state goes R -> N as 20
// one-word datagrams per change.
// Clocks: clk 50 MHz (both Ethernet sides), cam_clk 16.67 MHz, vga_clk 65 MHz.
module nes_link_top #(
  parameter int N       = 2,
  parameter int CLK_HZ  = 50_000_000,
  parameter int POLL_HZ = 60
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         cam_clk,
  input  logic         cam_rst,
  input  logic         vga_clk,
  input  logic         vga_rst,
  // NES side
  input  logic         cam_pix_valid,
  input  logic [15:0]  cam_pix,
  input  logic         nes_latch,
  input  logic         nes_pulse,
  output logic         nes_data,
  input  logic         n_eth_crsdv,
  input  logic [N-1:0] n_eth_rxd,
  output logic         n_eth_txen,
  output logic [N-1:0] n_eth_txd,
  output logic [7:0]   n_buttons,
  output logic [15:0]  n_lines_dropped,
  output logic [15:0]  n_frames_ok,
  output logic [15:0]  n_frames_bad,
  output logic [15:0]  n_ctrl_accepted,
  output logic [15:0]  n_ctrl_rejected,
  // remote side
  output logic         ctrl_latch,
  output logic         ctrl_pulse,
  input  logic         ctrl_data,
  output logic [3:0]   vga_r,
  output logic [3:0]   vga_g,
  output logic [3:0]   vga_b,
  output logic         vga_hs,
  output logic         vga_vs,
  input  logic         r_eth_crsdv,
  input  logic [N-1:0] r_eth_rxd,
  output logic         r_eth_txen,
  output logic [N-1:0] r_eth_txd,
  output logic [7:0]   r_buttons,
  output logic [15:0]  r_frames_ok,
  output logic [15:0]  r_frames_bad,
  output logic [15:0]  r_ctrl_sent
);
  n_fpga #(.N(N)) u_n (
    .cam_clk, .cam_rst, .cam_pix_valid, .cam_pix, .clk, .rst,
    .eth_crsdv(n_eth_crsdv), .eth_rxd(n_eth_rxd), .eth_txen(n_eth_txen), .eth_txd(n_eth_txd),
    .nes_latch, .nes_pulse, .nes_data, .buttons(n_buttons),
    .lines_dropped(n_lines_dropped), .frames_ok(n_frames_ok), .frames_bad(n_frames_bad),
    .ctrl_accepted(n_ctrl_accepted), .ctrl_rejected(n_ctrl_rejected)
  );

  r_fpga #(.N(N), .CLK_HZ(CLK_HZ), .POLL_HZ(POLL_HZ)) u_r (
    .clk, .rst, .vga_clk, .vga_rst,
    .eth_crsdv(r_eth_crsdv), .eth_rxd(r_eth_rxd), .eth_txen(r_eth_txen), .eth_txd(r_eth_txd),
    .ctrl_latch, .ctrl_pulse, .ctrl_data, .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs,
    .buttons(r_buttons), .frames_ok(r_frames_ok), .frames_bad(r_frames_bad), .ctrl_sent(r_ctrl_sent)
  );
endmodule
