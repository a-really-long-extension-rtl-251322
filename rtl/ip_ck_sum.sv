// ip_ck_sum: IPv4 header checksum computed while the header is being sent.
//
// The one's complement sum of the source and destination addresses is a
// constant, computed at elaboration from the parameters. start loads it;
// each header byte ip_tx sends outside the checksum and address fields
// (take) is paired with its neighbour into a big-endian 16-bit word and
// added with end-around carry. csum = ~sum is valid one cycle after the
// tenth byte, in time for the CHECKSUM field, so the header streams out
// without a pause.
module ip_ck_sum
  import nes_net_pkg::*;
#(
  parameter logic [31:0] SRC_IP = 32'h0A000001,
  parameter logic [31:0] DST_IP = 32'h0A000002
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        take,
  input  logic [7:0]  byte_i,
  output logic [15:0] csum
);
  localparam logic [15:0] ADDR_SUM = one_add(sum32(SRC_IP), sum32(DST_IP));
  logic [15:0] acc;
  logic [7:0]  hi;
  logic        half;

  always_ff @(posedge clk) begin
    if (rst || start) begin
      acc  <= ADDR_SUM;
      hi   <= '0;
      half <= 1'b0;
    end else if (take) begin
      if (!half) hi <= byte_i;
      else       acc <= one_add(acc, {hi, byte_i});
      half <= !half;
    end
  end
  assign csum = ~acc;
endmodule
