// udp_tx: UDP header source for the transmit stack.
//
// States READY -> PORTS (source and destination port, 4 bytes) -> LENGTH
// (8 + data bytes, 2 bytes) -> CHECKSUM (2 bytes, from transport_ck_sum)
// -> READY. While the ports and length go out, transport_ck_sum adds them
// to the data sum it already has, so the checksum is ready when its turn
// comes. in_csum marks the checksum bytes. Same byte interface as ether_tx.
// The state order follows the design; the port numbers are placeholders.
module udp_tx
  import nes_net_pkg::*;
#(
  parameter logic [15:0] SRC_PORT = 16'd4660,
  parameter logic [15:0] DST_PORT = 16'd4660
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        next,
  input  logic [15:0] data_bytes,
  input  logic [15:0] csum,
  output logic [7:0]  byte_o,
  output logic        last_o,
  output logic        in_csum
);
  typedef enum logic [1:0] {S_READY, S_PORTS, S_LENGTH, S_CHECKSUM} state_e;
  state_e      state;
  logic [1:0]  sub;
  logic [15:0] len;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_READY;
      sub   <= '0;
      len   <= '0;
    end else if (start) begin
      state <= S_PORTS;
      sub   <= '0;
      len   <= data_bytes + 16'(UDP_HDR_BYTES);
    end else if (next) begin
      sub <= sub + 2'd1;
      unique case (state)
        S_PORTS:    if (sub == 2'd3) begin state <= S_LENGTH;   sub <= '0; end
        S_LENGTH:   if (sub == 2'd1) begin state <= S_CHECKSUM; sub <= '0; end
        S_CHECKSUM: if (sub == 2'd1) begin state <= S_READY;    sub <= '0; end
        default:    sub <= '0;
      endcase
    end
  end

  always_comb begin
    unique case (state)
      S_PORTS:    byte_o = (sub == 2'd0) ? SRC_PORT[15:8] : (sub == 2'd1) ? SRC_PORT[7:0] :
                           (sub == 2'd2) ? DST_PORT[15:8] : DST_PORT[7:0];
      S_LENGTH:   byte_o = sub[0] ? len[7:0] : len[15:8];
      S_CHECKSUM: byte_o = sub[0] ? csum[7:0] : csum[15:8];
      default:    byte_o = 8'h00;
    endcase
  end
  assign last_o  = (state == S_CHECKSUM) && (sub == 2'd1);
  assign in_csum = (state == S_CHECKSUM);
endmodule
