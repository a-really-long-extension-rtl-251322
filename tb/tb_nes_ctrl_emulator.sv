// tb_nes_ctrl_emulator: plays the console's latch/pulse waveform (12 us
// latch, 8 pulses of 6 us low / 6 us high) at 50 MHz and samples the data
// line in the middle of each low half: the 8 samples must be the held
// buttons in the order A, B, Select, Start, Up, Down, Left, Right.
`include "tb_common.svh"
module tb_nes_ctrl_emulator;
  `TB_DECLS
  logic clk = 0, rst = 1, nes_latch = 0, nes_pulse = 1, nes_data;
  logic [7:0] buttons = 0;
  always #10 clk = ~clk;
  nes_ctrl_emulator dut (.clk, .rst, .buttons, .nes_latch, .nes_pulse, .nes_data);
  initial begin #20ms; failures++; `TB_FINISH end
  initial begin
    logic [7:0] s;
    #100ns rst = 0;
    for (int p = 0; p < 30; p++) begin
      buttons = 8'($urandom);
      #1us nes_latch = 1;
      #6us `CHECK(nes_data == buttons[7], "A during latch")
      #6us nes_latch = 0;
      #6us;
      for (int k = 0; k < 8; k++) begin
        nes_pulse = 0;
        #3us s[7 - k] = nes_data;
        #3us nes_pulse = 1;
        #6us;
      end
      `CHECK(s == buttons, $sformatf("p=%0d read %h vs %h", p, s, buttons))
      #20us;
    end
    `TB_FINISH
  end
endmodule
