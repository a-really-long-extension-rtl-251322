// nes_ctrl_reader: reads a real NES controller from the remote FPGA by
// playing the console's part.
//
// POLL_HZ times a second it raises latch for 12 us, waits 6 us, then sends
// 8 pulses on the pulse line (high at rest), each 6 us low and 6 us high.
// The controller's data line is synchronised and sampled in the middle of
// each low half; during pulse k it carries button k of
// {A, B, Select, Start, Up, Down, Left, Right}, high meaning pressed, and
// the buttons are collected with A in bit 7. After the eighth pulse the new
// state is presented on buttons, and changed pulses for one cycle when it
// differs from the previous poll (or on the first poll after reset).
// The timing and polarity follow the design; all durations are derived
// from CLK_HZ (50 MHz: 300 cycles per 6 us).
module nes_ctrl_reader #(
  parameter int CLK_HZ  = 50_000_000,
  parameter int POLL_HZ = 60
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ctrl_data,
  output logic       ctrl_latch,
  output logic       ctrl_pulse,
  output logic [7:0] buttons,
  output logic       changed
);
  localparam int T6     = CLK_HZ / 1_000_000 * 6;   // cycles in 6 us
  localparam int PERIOD = CLK_HZ / POLL_HZ;

  typedef enum logic [2:0] {S_WAIT, S_LATCH, S_GAP, S_LOW, S_HIGH} state_e;
  state_e      state;
  logic [31:0] period_cnt;
  logic [31:0] t;
  logic [2:0]  k;
  logic [7:0]  shift;
  logic [1:0]  dsync;
  logic        first;

  assign ctrl_latch = (state == S_LATCH);
  assign ctrl_pulse = (state != S_LOW);

  always_ff @(posedge clk) begin
    changed <= 1'b0;
    if (rst) begin
      state      <= S_WAIT;
      period_cnt <= '0;
      t          <= '0;
      k          <= '0;
      shift      <= '0;
      dsync      <= '0;
      buttons    <= '0;
      first      <= 1'b1;
    end else begin
      dsync      <= {dsync[0], ctrl_data};
      period_cnt <= (int'(period_cnt) == PERIOD - 1) ? '0 : period_cnt + 32'd1;
      t          <= t + 32'd1;
      unique case (state)
        S_WAIT: if (period_cnt == '0) begin state <= S_LATCH; t <= '0; end
        S_LATCH: if (int'(t) == 2 * T6 - 1) begin state <= S_GAP; t <= '0; end
        S_GAP: if (int'(t) == T6 - 1) begin state <= S_LOW; t <= '0; k <= '0; end
        S_LOW: begin
          if (int'(t) == T6 / 2) shift <= {shift[6:0], dsync[1]};
          if (int'(t) == T6 - 1) begin state <= S_HIGH; t <= '0; end
        end
        default: begin   // S_HIGH
          if (int'(t) == T6 - 1) begin
            t <= '0;
            if (k == 3'd7) begin
              state   <= S_WAIT;
              buttons <= shift;
              changed <= first || (shift != buttons);
              first   <= 1'b0;
            end else begin
              state <= S_LOW;
              k     <= k + 3'd1;
            end
          end
        end
      endcase
    end
  end
endmodule
