// tb_nes_link_full: full-size run of nes_link_top with its default
// parameters (50 MHz RMII clock, 60 Hz controller poll, 320x240 picture,
// 1024x768 VGA), the two FPGAs joined by a direct cable model.
// One complete operation of each path:
//  - video: one whole camera frame, 240 lines of 320 pixels with blanking
//    between lines long enough for each line's frame to leave, crosses
//    N -> R; then one whole VGA refresh is compared pixel by pixel with the
//    12-bit form of the camera picture (top-left) and black elsewhere;
//  - controller: one state change on the controller model, picked up by
//    the 60 Hz poll, sent as 20 datagrams R -> N and read back by a console
//    model on the NES-side latch/pulse/data pins.
// Line period here is an own choice (about 67 us); not mentioned.
`include "tb_common.svh"
module tb_nes_link_full;
  `TB_DECLS
  logic clk = 0, rst = 1, cam_clk = 0, cam_rst = 1, vga_clk = 0, vga_rst = 1;
  logic pix_valid = 0;
  logic [15:0] pix = 0;
  logic nes_latch = 0, nes_pulse = 1, nes_data;
  logic n_txen, r_txen, ctrl_latch, ctrl_pulse, ctrl_data, hs, vs;
  logic [1:0] n_txd, r_txd;
  logic [3:0] vr, vg, vb;
  logic [7:0] n_buttons, r_buttons, pressed = 8'h00;
  logic [15:0] n_drop, n_ok, n_bad, n_acc, n_rej, r_ok, r_bad, r_sent;
  always #10 clk = ~clk;
  always #30 cam_clk = ~cam_clk;
  always #7.692 vga_clk = ~vga_clk;

  nes_link_top dut (
    .clk, .rst, .cam_clk, .cam_rst, .vga_clk, .vga_rst,
    .cam_pix_valid(pix_valid), .cam_pix(pix), .nes_latch, .nes_pulse, .nes_data,
    .n_eth_crsdv(r_txen), .n_eth_rxd(r_txd), .n_eth_txen(n_txen), .n_eth_txd(n_txd),
    .n_buttons, .n_lines_dropped(n_drop), .n_frames_ok(n_ok), .n_frames_bad(n_bad),
    .n_ctrl_accepted(n_acc), .n_ctrl_rejected(n_rej),
    .ctrl_latch, .ctrl_pulse, .ctrl_data, .vga_r(vr), .vga_g(vg), .vga_b(vb), .vga_hs(hs), .vga_vs(vs),
    .r_eth_crsdv(n_txen), .r_eth_rxd(n_txd), .r_eth_txen(r_txen), .r_eth_txd(r_txd),
    .r_buttons, .r_frames_ok(r_ok), .r_frames_bad(r_bad), .r_ctrl_sent(r_sent));
  nes_controller_model ctl (.latch(ctrl_latch), .pulse(ctrl_pulse), .pressed, .data(ctrl_data));

  // camera picture as sent, and the VGA checker (output is one cycle
  // behind the timing counters)
  logic [15:0] picture [240*320];
  bit vga_check = 0;
  int vga_checked, vga_bad, hs_pulses, vs_pulses;
  logic [10:0] hq;
  logic [9:0] vq;
  logic hs_q = 1, vs_q = 1;
  always @(posedge vga_clk) begin
    if (vga_check && vq < 10'd768 && hq < 11'd1024) begin
      automatic logic [11:0] e = 12'h000;
      automatic logic [15:0] p;
      if (hq < 11'd320 && vq < 10'd240) begin
        p = picture[int'(vq) * 320 + int'(hq)];
        e = {p[15:12], p[10:7], p[4:1]};
      end
      vga_checked++;
      if ({vr, vg, vb} != e) vga_bad++;
    end
    if (vga_check && hs_q && !hs) hs_pulses++;
    if (vga_check && vs_q && !vs) vs_pulses++;
    hs_q <= hs; vs_q <= vs;
    hq <= dut.u_r.u_vga.hcount; vq <= dut.u_r.u_vga.vcount;
  end

  initial begin #90ms; failures++; $display("watchdog"); `TB_FINISH end

  task automatic console_read(output logic [7:0] s);
    #1us nes_latch = 1; #12us nes_latch = 0; #6us;
    for (int k = 0; k < 8; k++) begin
      nes_pulse = 0; #3us s[7 - k] = nes_data; #3us nes_pulse = 1; #6us;
    end
  endtask

  initial begin
    logic [7:0] s;
    repeat (4) @(posedge cam_clk); rst <= 0; cam_rst <= 0; vga_rst <= 0;
    fork
      begin // one camera frame
        for (int i = 0; i < 240 * 320; i++) begin
          picture[i] = 16'($urandom);
          @(posedge cam_clk); pix_valid <= 1; pix <= picture[i];
          if (i % 320 == 319) begin
            @(posedge cam_clk); pix_valid <= 0;
            repeat (800) @(posedge cam_clk);
          end
        end
      end
      begin // one button change, then wait for two polls
        pressed = 8'h81;
        #40ms;
        console_read(s);
        `CHECK(s == 8'h81 && n_buttons == 8'h81, $sformatf("console read %h", s))
      end
    join
    `CHECK(r_ok == 16'd240 && r_bad == 16'd0 && n_drop == 16'd0,
           $sformatf("video frames ok %0d bad %0d dropped lines %0d", r_ok, r_bad, n_drop))
    `CHECK(r_sent == 16'd20 && n_acc == 16'd20 && n_rej == 16'd0 && n_ok == 16'd20,
           $sformatf("controller sent %0d accepted %0d rejected %0d", r_sent, n_acc, n_rej))
    wait (dut.u_r.u_vga.vcount == 10'd100);
    wait (dut.u_r.u_vga.vcount == 10'd0);
    vga_check = 1;
    wait (dut.u_r.u_vga.vcount == 10'd100);
    wait (dut.u_r.u_vga.vcount == 10'd0);
    @(posedge vga_clk); @(posedge vga_clk);
    vga_check = 0;
    `CHECK(vga_checked == 1024 * 768 && vga_bad == 0, $sformatf("vga checked %0d bad %0d", vga_checked, vga_bad))
    `CHECK(hs_pulses == 806 && vs_pulses == 1, $sformatf("hsync %0d vsync %0d", hs_pulses, vs_pulses))
    `TB_FINISH
  end
endmodule
