// data_ck_sum: one's complement sum and length of the data being queued.
//
// Every 16-bit word written into the send buffer is also added here, with
// end-around carry, and counted, so that when the last word arrives the
// UDP length and the data's share of the UDP checksum are already known and
// the headers can be streamed without waiting. clear starts a new datagram.
// sum is the plain (not complemented) sum; bytes is twice the word count.
module data_ck_sum
  import nes_net_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        clear,
  input  logic        axiiv,
  input  logic [15:0] axiid,
  output logic [15:0] sum,
  output logic [15:0] bytes
);
  always_ff @(posedge clk) begin
    if (rst || clear) begin
      sum   <= '0;
      bytes <= '0;
    end else if (axiiv) begin
      sum   <= one_add(sum, axiid);
      bytes <= bytes + 16'd2;
    end
  end
endmodule
