// transport_ck_sum: UDP checksum computed while the UDP header is sent.
//
// start loads the sum of everything already known before the header goes
// out: the IPv4 pseudo-header (source and destination address, protocol 17,
// UDP length) and the data sum from data_ck_sum. Each header byte udp_tx
// sends before the checksum field (ports and length, take) is paired into a
// 16-bit word and added. csum is the complement, with 0 sent as 0xFFFF as
// RFC 768 asks. Including the pseudo-header follows RFC 768.
module transport_ck_sum
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
  input  logic [15:0] data_sum,
  input  logic [15:0] data_bytes,
  output logic [15:0] csum
);
  localparam logic [15:0] ADDR_SUM =
    one_add(one_add(sum32(SRC_IP), sum32(DST_IP)), {8'h00, IP_PROTO_UDP});
  logic [15:0] acc;
  logic [7:0]  hi;
  logic        half;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc  <= '0;
      hi   <= '0;
      half <= 1'b0;
    end else if (start) begin
      acc  <= one_add(one_add(ADDR_SUM, data_sum), data_bytes + 16'(UDP_HDR_BYTES));
      hi   <= '0;
      half <= 1'b0;
    end else if (take) begin
      if (!half) hi <= byte_i;
      else       acc <= one_add(acc, {hi, byte_i});
      half <= !half;
    end
  end
  assign csum = (acc == 16'hFFFF) ? 16'hFFFF : ~acc;
endmodule
