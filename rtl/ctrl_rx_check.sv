// ctrl_rx_check: corruption check for received controller datagrams on the
// NES-side FPGA.
//
// Every received word carries the button state twice. If the two bytes are
// equal the held state (buttons) is updated at once and accepted counts
// up; otherwise the word is ignored and rejected counts up. The held state
// stays until a good word with a new state arrives. Updates take effect on
// the clock edge after the word.
module ctrl_rx_check (
  input  logic        clk,
  input  logic        rst,
  input  logic        axiiv,
  input  logic [15:0] axiid,
  output logic [7:0]  buttons,
  output logic [15:0] accepted,
  output logic [15:0] rejected
);
  always_ff @(posedge clk) begin
    if (rst) begin
      buttons  <= '0;
      accepted <= '0;
      rejected <= '0;
    end else if (axiiv) begin
      if (axiid[15:8] == axiid[7:0]) begin
        buttons  <= axiid[7:0];
        accepted <= accepted + 16'd1;
      end else begin
        rejected <= rejected + 16'd1;
      end
    end
  end
endmodule
