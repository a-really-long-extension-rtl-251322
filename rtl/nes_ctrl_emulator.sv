// nes_ctrl_emulator: stands in for a controller towards the NES console.
//
// The console's latch and pulse lines are synchronised to the FPGA clock.
// While latch is high the held button state is loaded into a shift
// register whose top bit (A) drives the data line; each rising edge of
// pulse (the end of its low half) shifts to the next button, so during the
// low half of pulse k the line shows button k, high for pressed, as the
// design describes. After the eighth button the line reads 0. The data line
// is registered and lags the console's edges by three clock cycles (60 ns
// at 50 MHz), far inside the 6 us half-pulse.
module nes_ctrl_emulator (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] buttons,
  input  logic       nes_latch,
  input  logic       nes_pulse,
  output logic       nes_data
);
  logic [1:0] lsync;
  logic [2:0] psync;
  logic [7:0] sh;

  always_ff @(posedge clk) begin
    if (rst) begin
      lsync    <= '0;
      psync    <= '1;
      sh       <= '0;
      nes_data <= 1'b0;
    end else begin
      lsync <= {lsync[0], nes_latch};
      psync <= {psync[1:0], nes_pulse};
      if (lsync[1])                      sh <= buttons;
      else if (psync[1] && !psync[2])    sh <= {sh[6:0], 1'b0};
      nes_data <= lsync[1] ? buttons[7] : sh[7];
    end
  end
endmodule
