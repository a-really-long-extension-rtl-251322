// ether_tx: Ethernet header source for the transmit stack.
//
// After start it offers, one byte at a time, the 7 preamble bytes 0x55, the
// SFD 0xD5, the destination MAC, the source MAC (both most significant byte
// first) and the EtherType 0x0800 (IPv4): 22 bytes. byte_o/last_o describe
// the byte currently offered; next (from the output multiplexer) moves on
// to the following byte on the next clock edge. The broadcast destination
// is the address the design was tested with; the source MAC is a
// locally administered placeholder.
module ether_tx
  import nes_net_pkg::*;
#(
  parameter logic [47:0] DST_MAC = 48'hFFFF_FFFF_FFFF,
  parameter logic [47:0] SRC_MAC = 48'h0200_0000_0001
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       next,
  output logic [7:0] byte_o,
  output logic       last_o
);
  localparam int NBYTES = PREAMBLE_BYTES + ETH_HDR_BYTES;   // 22
  logic [4:0] idx;

  always_ff @(posedge clk) begin
    if (rst || start)                        idx <= '0;
    else if (next && int'(idx) < NBYTES - 1) idx <= idx + 5'd1;
  end

  always_comb begin
    unique case (idx)
      5'd0, 5'd1, 5'd2, 5'd3, 5'd4, 5'd5, 5'd6: byte_o = 8'h55;
      5'd7:  byte_o = 8'hD5;
      5'd8:  byte_o = DST_MAC[47:40];
      5'd9:  byte_o = DST_MAC[39:32];
      5'd10: byte_o = DST_MAC[31:24];
      5'd11: byte_o = DST_MAC[23:16];
      5'd12: byte_o = DST_MAC[15:8];
      5'd13: byte_o = DST_MAC[7:0];
      5'd14: byte_o = SRC_MAC[47:40];
      5'd15: byte_o = SRC_MAC[39:32];
      5'd16: byte_o = SRC_MAC[31:24];
      5'd17: byte_o = SRC_MAC[23:16];
      5'd18: byte_o = SRC_MAC[15:8];
      5'd19: byte_o = SRC_MAC[7:0];
      5'd20: byte_o = ETHERTYPE_IPV4[15:8];
      default: byte_o = ETHERTYPE_IPV4[7:0];
    endcase
  end
  assign last_o = (int'(idx) == NBYTES - 1);
endmodule
