// ip_tx: IPv4 header source for the transmit stack.
//
// A state machine steps through the header fields in sending order:
// VERSION/IHL (0x45), DSCP_ECN, LENGTH (20 + 8 + data bytes), identification
// (an internal counter, one step per packet), FRAGS (Don't Fragment set,
// offset 0), TTL, PROTOCOL (UDP), CHECKSUM, SOURCE, DESTINATION. The
// checksum bytes come from ip_ck_sum, which has summed every earlier header
// word by then and holds the precomputed sum of the two addresses. in_csum
// marks the bytes that ip_ck_sum must not add (checksum and addresses).
// Same byte interface as ether_tx: start, next, byte_o, last_o.
// The state sequence follows the design; TTL 64 and the field sizes of
// RFC 791 are this implementation's.
module ip_tx
  import nes_net_pkg::*;
#(
  parameter logic [31:0] SRC_IP = 32'h0A000001,
  parameter logic [31:0] DST_IP = 32'h0A000002,
  parameter logic [7:0]  TTL    = 8'd64
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
  typedef enum logic [3:0] {
    S_READY, S_VERSION_IHL, S_DSCP_ECN, S_LENGTH, S_IDENT, S_FRAGS, S_TTL,
    S_PROTOCOL, S_CHECKSUM, S_SOURCE, S_DESTINATION
  } state_e;
  state_e      state;
  logic [1:0]  sub;           // byte within a multi-byte field
  logic [15:0] ident;
  logic [15:0] total_len;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_READY;
      sub       <= '0;
      ident     <= '0;
      total_len <= '0;
    end else if (start) begin
      state     <= S_VERSION_IHL;
      sub       <= '0;
      ident     <= ident + 16'd1;
      total_len <= data_bytes + 16'(IP_HDR_BYTES + UDP_HDR_BYTES);
    end else if (next) begin
      sub <= sub + 2'd1;
      unique case (state)
        S_VERSION_IHL: begin state <= S_DSCP_ECN; sub <= '0; end
        S_DSCP_ECN:    begin state <= S_LENGTH;   sub <= '0; end
        S_LENGTH:      if (sub == 2'd1) begin state <= S_IDENT; sub <= '0; end
        S_IDENT:       if (sub == 2'd1) begin state <= S_FRAGS; sub <= '0; end
        S_FRAGS:       if (sub == 2'd1) begin state <= S_TTL;   sub <= '0; end
        S_TTL:         begin state <= S_PROTOCOL; sub <= '0; end
        S_PROTOCOL:    begin state <= S_CHECKSUM; sub <= '0; end
        S_CHECKSUM:    if (sub == 2'd1) begin state <= S_SOURCE; sub <= '0; end
        S_SOURCE:      if (sub == 2'd3) begin state <= S_DESTINATION; sub <= '0; end
        S_DESTINATION: if (sub == 2'd3) begin state <= S_READY; sub <= '0; end
        default:       sub <= '0;
      endcase
    end
  end

  always_comb begin
    byte_o = 8'h00;
    unique case (state)
      S_VERSION_IHL: byte_o = 8'h45;
      S_DSCP_ECN:    byte_o = 8'h00;
      S_LENGTH:      byte_o = sub[0] ? total_len[7:0] : total_len[15:8];
      S_IDENT:       byte_o = sub[0] ? ident[7:0] : ident[15:8];
      S_FRAGS:       byte_o = sub[0] ? 8'h00 : 8'h40;   // DF set
      S_TTL:         byte_o = TTL;
      S_PROTOCOL:    byte_o = IP_PROTO_UDP;
      S_CHECKSUM:    byte_o = sub[0] ? csum[7:0] : csum[15:8];
      S_SOURCE:      byte_o = SRC_IP[8*(3-int'(sub)) +: 8];
      S_DESTINATION: byte_o = DST_IP[8*(3-int'(sub)) +: 8];
      default:       byte_o = 8'h00;
    endcase
  end
  assign last_o  = (state == S_DESTINATION) && (sub == 2'd3);
  assign in_csum = (state == S_CHECKSUM) || (state == S_SOURCE) || (state == S_DESTINATION);
endmodule
