// tb_nes_link_top: both FPGAs joined by a direct Ethernet cable model, with
// the controller poll sped up (CLK_HZ = 1 MHz, POLL_HZ = 2000).
// Video: camera lines go N -> R. Three lines are sent back to back, so one
// must be dropped in the line buffer while the next one stalls waiting for
// the network stack; one frame on the cable gets a flipped bit, so R must
// discard it by its FCS. The frame buffer must then hold, in order, the
// 12-bit form of exactly the lines that arrived intact.
// Controller: the controller model's state changes twice; each change must
// produce a burst of 20 padded datagrams R -> N, and a console model
// reading the NES-side data line must see the new state. Two forged
// frames (copies that differ; wrong destination IP) are injected towards N
// and must be rejected. Every mechanism is counted and must occur.
`include "tb_common.svh"
module tb_nes_link_top;
  import tb_net_pkg::*;
  `TB_DECLS
  localparam logic [31:0] NIP = 32'h0A000001, RIP = 32'h0A000002;
  logic clk = 0, rst = 1, cam_clk = 0, cam_rst = 1, vga_clk = 0, vga_rst = 1;
  logic pix_valid = 0;
  logic [15:0] pix = 0;
  logic nes_latch = 0, nes_pulse = 1, nes_data;
  logic n_crsdv, r_crsdv, n_txen, r_txen, ctrl_latch, ctrl_pulse, ctrl_data, hs, vs;
  logic [1:0] n_rxd, r_rxd, n_txd, r_txd;
  logic [3:0] vr, vg, vb;
  logic [7:0] n_buttons, r_buttons, pressed = 8'h00;
  logic [15:0] n_drop, n_ok, n_bad, n_acc, n_rej, r_ok, r_bad, r_sent;
  always #10 clk = ~clk;
  always #30 cam_clk = ~cam_clk;
  always #7.692 vga_clk = ~vga_clk;

  nes_link_top #(.CLK_HZ(1_000_000), .POLL_HZ(2000)) dut (
    .clk, .rst, .cam_clk, .cam_rst, .vga_clk, .vga_rst,
    .cam_pix_valid(pix_valid), .cam_pix(pix), .nes_latch, .nes_pulse, .nes_data,
    .n_eth_crsdv(n_crsdv), .n_eth_rxd(n_rxd), .n_eth_txen(n_txen), .n_eth_txd(n_txd),
    .n_buttons, .n_lines_dropped(n_drop), .n_frames_ok(n_ok), .n_frames_bad(n_bad),
    .n_ctrl_accepted(n_acc), .n_ctrl_rejected(n_rej),
    .ctrl_latch, .ctrl_pulse, .ctrl_data, .vga_r(vr), .vga_g(vg), .vga_b(vb), .vga_hs(hs), .vga_vs(vs),
    .r_eth_crsdv(r_crsdv), .r_eth_rxd(r_rxd), .r_eth_txen(r_txen), .r_eth_txd(r_txd),
    .r_buttons, .r_frames_ok(r_ok), .r_frames_bad(r_bad), .r_ctrl_sent(r_sent));
  nes_controller_model ctl (.latch(ctrl_latch), .pulse(ctrl_pulse), .pressed, .data(ctrl_data));

  // cable N -> R, with one dibit flipped in the frame chosen by corrupt_frame
  int n_frames_seen = 0, n_sym = 0, corrupt_frame = 3;
  logic n_txen_q = 0;
  always @(posedge clk) begin
    n_txen_q <= n_txen;
    if (!rst && n_txen && !n_txen_q) n_frames_seen++;
    n_sym = n_txen ? n_sym + 1 : 0;
  end
  assign r_crsdv = n_txen;
  assign r_rxd   = n_txd ^ ((n_frames_seen == corrupt_frame && n_sym == 900) ? 2'b10 : 2'b00);

  // cable R -> N, or the forging model while R is quiet
  logic f_crsdv;
  logic [1:0] f_rxd;
  bit forging = 0;
  rmii_bfm forge (.clk, .crsdv(f_crsdv), .rxd(f_rxd), .txen(1'b0), .txd(2'b00));
  assign n_crsdv = forging ? f_crsdv : r_txen;
  assign n_rxd   = forging ? f_rxd : r_txd;

  // observers: what N puts on the cable, and the mechanisms
  logic unused_c; logic [1:0] unused_d;
  rmii_bfm mon (.clk, .crsdv(unused_c), .rxd(unused_d), .txen(n_txen), .txd(n_txd));
  int stalls, pads;
  always @(posedge clk) begin
    if (dut.u_n.u_lb.axiov && !dut.u_n.u_lb.ready) stalls++;
    if (dut.u_r.u_tx.u_pre.load && int'(dut.u_r.u_tx.u_pre.phase) == 5) pads++;
  end

  initial begin #30ms; failures++; $display("watchdog"); `TB_FINISH end

  task automatic console_read(output logic [7:0] s);
    #1us nes_latch = 1; #12us nes_latch = 0; #6us;
    for (int k = 0; k < 8; k++) begin
      nes_pulse = 0; #3us s[7 - k] = nes_data; #3us nes_pulse = 1; #6us;
    end
  endtask

  task automatic cam_line(int blank);
    for (int i = 0; i < 320; i++) begin
      @(posedge cam_clk); pix_valid <= 1; pix <= 16'($urandom);
    end
    @(posedge cam_clk); pix_valid <= 0;
    repeat (blank) @(posedge cam_clk);
  endtask

  initial begin
    logic [7:0] s;
    logic [15:0] exp[$];
    bq_t d;
    int acc0;
    repeat (4) @(posedge cam_clk); rst <= 0; cam_rst <= 0; vga_rst <= 0;
    mon.clear();
    fork
      begin // video: 3 lines back to back, then 4 with blanking
        repeat (3) cam_line(0);
        repeat (4) cam_line(1200);
      end
      begin // controller
        pressed = 8'h18;
        repeat (9000) @(posedge clk);
        console_read(s);
        `CHECK(s == 8'h18 && n_buttons == 8'h18, $sformatf("console read %h", s))
        pressed = 8'hC3;
        repeat (9000) @(posedge clk);
        console_read(s);
        `CHECK(s == 8'hC3, $sformatf("console read %h", s))
      end
    join
    repeat (9000) @(posedge clk);
    // forged frames towards N while R is quiet
    acc0 = n_acc;
    forging = 1;
    d.delete(); d.push_back(8'h77); d.push_back(8'h76);
    forge.send(eth_frame(48'hFFFF_FFFF_FFFF, 48'h2, ip_udp(RIP, NIP, 16'd9, d)));
    d.delete(); d.push_back(8'h66); d.push_back(8'h66);
    forge.send(eth_frame(48'hFFFF_FFFF_FFFF, 48'h2, ip_udp(RIP, 32'h0A0000FF, 16'd10, d)));
    forging = 0;
    repeat (100) @(posedge clk);
    console_read(s);
    `CHECK(s == 8'hC3 && n_acc == acc0, $sformatf("forged frames changed state %h", s))

    // video bookkeeping: frames on the cable are camera lines; the one
    // corrupted on the cable is lost, the rest fill the frame buffer in order
    `CHECK(mon.frames.size() == 5, $sformatf("frames on cable %0d", mon.frames.size()))
    exp.delete();
    foreach (mon.frames[i]) if (i != corrupt_frame - 1)
      for (int k = 0; k < 320; k++) exp.push_back({mon.frames[i][42 + 2*k], mon.frames[i][43 + 2*k]});
    `CHECK(r_ok == 16'(mon.frames.size() - 1) && r_bad == 16'd1, $sformatf("R frames ok %0d bad %0d", r_ok, r_bad))
    begin
      int bad = 0;
      foreach (exp[i]) if (dut.u_r.u_fb.mem[i] != {exp[i][15:12], exp[i][10:7], exp[i][4:1]}) begin
        if (bad < 3) $display("px %0d got %h exp %h", i, dut.u_r.u_fb.mem[i], exp[i]); bad++; end
      `CHECK(bad == 0 && exp.size() == 4 * 320, $sformatf("frame buffer: %0d of %0d pixels wrong", bad, exp.size()))
    end
    // mechanisms
    `CHECK(n_drop == 16'd2, $sformatf("line drops %0d", n_drop))
    `CHECK(stalls > 0, "no line buffer stall")
    `CHECK(r_bad > 0, "no FCS discard")
    `CHECK(n_rej == 16'd1, $sformatf("copy mismatch rejects %0d", n_rej))
    `CHECK(n_bad == 16'd1, $sformatf("IP rejects at N %0d", n_bad))
    `CHECK(r_sent == 16'd40 && n_acc == 16'd40, $sformatf("controller datagrams sent %0d accepted %0d", r_sent, n_acc))
    `CHECK(pads > 0, "no padded frame")
    $display("mechanisms: line_drop=%0d stall_cycles=%0d fcs_discard=%0d copy_reject=%0d ip_reject=%0d ctrl_datagrams=%0d padding_bytes=%0d",
             n_drop, stalls, r_bad, n_rej, n_bad, n_acc, pads);
    `TB_FINISH
  end
endmodule
