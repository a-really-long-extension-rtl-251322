// r_fpga: the remote FPGA beside the player.
//
// Video: the receiving network stack delivers each line datagram as 16-bit
// pixels; pixel_decoder turns them into 12-bit colour and the framebuffer
// stores them at consecutive addresses (Ethernet clock). vga_timing scans
// the screen on the VGA clock and the framebuffer's read port supplies the
// pixel under the beam; syncs and blanking are delayed one cycle to line up
// with the RAM read.
// Controller: nes_ctrl_reader polls the player's controller 60 times a
// second; ctrl_repeat_tx sends each new state 20 times through the
// transmitting network stack to the NES-side FPGA.
module r_fpga #(
  parameter int          N       = 2,
  parameter int          DEPTH   = 320,
  parameter int          H       = 320,
  parameter int          V       = 240,
  parameter int          CLK_HZ  = 50_000_000,
  parameter int          POLL_HZ = 60,
  parameter int          COPIES  = 20,
  parameter logic [31:0] MY_IP   = 32'h0A000002,
  parameter logic [31:0] PEER_IP = 32'h0A000001,
  parameter logic [47:0] MY_MAC  = 48'h0200_0000_0002
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         vga_clk,
  input  logic         vga_rst,
  input  logic         eth_crsdv,
  input  logic [N-1:0] eth_rxd,
  output logic         eth_txen,
  output logic [N-1:0] eth_txd,
  output logic         ctrl_latch,
  output logic         ctrl_pulse,
  input  logic         ctrl_data,
  output logic [3:0]   vga_r,
  output logic [3:0]   vga_g,
  output logic [3:0]   vga_b,
  output logic         vga_hs,
  output logic         vga_vs,
  output logic [7:0]   buttons,
  output logic [15:0]  frames_ok,
  output logic [15:0]  frames_bad,
  output logic [15:0]  ctrl_sent
);
  logic        rx_v, px_v;
  logic [15:0] rx_d;
  logic [11:0] px_d, rpix;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hs, vs, blank, hs_q, vs_q, blank_q;
  logic        changed, c_v, c_last, tx_ready;
  logic [15:0] c_d;

  net_rx #(.N(N), .MY_IP(MY_IP), .DEPTH(DEPTH)) u_rx (
    .clk, .rst, .eth_crsdv, .eth_rxd, .axiov(rx_v), .axiod(rx_d),
    .frames_ok, .frames_bad, .src_ip()
  );

  pixel_decoder u_dec (
    .clk, .in_valid(rx_v), .in_pix(rx_d), .out_valid(px_v), .out_pix(px_d)
  );

  framebuffer #(.H(H), .V(V), .PW(12)) u_fb (
    .wclk(clk), .wrst(rst), .wvalid(px_v), .wpix(px_d),
    .rclk(vga_clk), .hcount, .vcount, .rpix
  );

  vga_timing u_vga (
    .clk(vga_clk), .rst(vga_rst), .hcount, .vcount, .hsync(hs), .vsync(vs), .blank
  );

  always_ff @(posedge vga_clk) begin
    hs_q    <= hs;
    vs_q    <= vs;
    blank_q <= blank;
  end
  assign vga_hs = hs_q;
  assign vga_vs = vs_q;
  assign {vga_r, vga_g, vga_b} = blank_q ? 12'h000 : rpix;

  nes_ctrl_reader #(.CLK_HZ(CLK_HZ), .POLL_HZ(POLL_HZ)) u_rd (
    .clk, .rst, .ctrl_data, .ctrl_latch, .ctrl_pulse, .buttons, .changed
  );

  ctrl_repeat_tx #(.COPIES(COPIES)) u_rep (
    .clk, .rst, .buttons, .changed, .ready(tx_ready),
    .axiov(c_v), .axiod(c_d), .axio_last(c_last), .sent(ctrl_sent)
  );

  net_tx #(.N(N), .DEPTH(DEPTH), .SRC_MAC(MY_MAC), .SRC_IP(MY_IP), .DST_IP(PEER_IP)) u_tx (
    .clk, .rst, .axiiv(c_v), .axiid(c_d), .axii_last(c_last), .ready(tx_ready),
    .eth_txen, .eth_txd
  );
endmodule
