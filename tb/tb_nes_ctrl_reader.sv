// tb_nes_ctrl_reader: runs the reader at CLK_HZ = 1 MHz (one cycle per us)
// and POLL_HZ = 1000 against a controller model. Checks the waveform the
// design gives (latch 12 us, first pulse 6 us after latch, 8 pulses of
// 6 us low and 6 us high, one poll per 1000 cycles), that buttons matches
// the pressed set after each poll, and that changed pulses exactly for
// polls whose result differs from the previous one.
`include "tb_common.svh"
module tb_nes_ctrl_reader;
  `TB_DECLS
  logic clk = 0, rst = 1, ctrl_data, ctrl_latch, ctrl_pulse, changed;
  logic [7:0] buttons, pressed = 8'h00;
  always #500 clk = ~clk;
  nes_ctrl_reader #(.CLK_HZ(1_000_000), .POLL_HZ(1000)) dut (.clk, .rst, .ctrl_data, .ctrl_latch,
                                                            .ctrl_pulse, .buttons, .changed);
  nes_controller_model ctl (.latch(ctrl_latch), .pulse(ctrl_pulse), .pressed, .data(ctrl_data));

  int c, latch_rise, latch_fall, pulse_falls, pulse_rises, last_pf, last_pr, nchanged;
  int timing_bad;
  logic lq = 0, pq = 1;
  always @(posedge clk) begin
    c++;
    if (ctrl_latch && !lq) begin
      if (latch_rise > 0 && c - latch_rise != 1000) timing_bad++;
      latch_rise = c; pulse_falls = 0;
    end
    if (!ctrl_latch && lq) begin latch_fall = c; if (c - latch_rise != 12) timing_bad++; end
    if (!ctrl_pulse && pq) begin
      if (pulse_falls == 0 && c - latch_fall != 6) timing_bad++;
      if (pulse_falls > 0 && c - last_pf != 12) timing_bad++;
      pulse_falls++; last_pf = c;
    end
    if (ctrl_pulse && !pq && c - last_pf != 6) timing_bad++;
    if (changed) nchanged++;
    lq = ctrl_latch; pq = ctrl_pulse;
  end

  initial begin repeat (40000) @(posedge clk); failures++; $display("watchdog"); `TB_FINISH end
  initial begin
    logic [7:0] prev;
    int exp_changes = 0;
    repeat (2) @(posedge clk); rst <= 0;
    prev = 8'hxx;
    for (int p = 0; p < 20; p++) begin
      pressed = (p % 3 == 2) ? prev : 8'($urandom);
      if (p == 0 || pressed != prev) exp_changes++;
      prev = pressed;
      @(posedge ctrl_latch);
      @(negedge ctrl_latch);
      repeat (200) @(posedge clk);
      `CHECK(buttons == pressed, $sformatf("poll %0d buttons %h vs %h", p, buttons, pressed))
      `CHECK(pulse_falls == 8, $sformatf("poll %0d pulses %0d", p, pulse_falls))
    end
    `CHECK(nchanged == exp_changes, $sformatf("changed %0d vs %0d", nchanged, exp_changes))
    `CHECK(timing_bad == 0, $sformatf("%0d timing errors", timing_bad))
    `TB_FINISH
  end
endmodule
