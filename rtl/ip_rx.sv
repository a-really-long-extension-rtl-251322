// ip_rx: IPv4 receive layer.
//
// A byte-wide state machine walks the fixed 20-byte header in the order of
// its fields (version/IHL, DSCP/ECN, total length, identification, flags and
// fragment offset, TTL, protocol, header checksum, source, destination) and
// sums the header as 16-bit words with one's complement addition while it
// streams in. It goes to INVALID for the rest of the frame when the version
// is not 4, the header is not 20 bytes long (options present), the packet
// allows fragmenting (Don't Fragment clear), the protocol is not UDP, the
// destination is not MY_IP, or the header sum is not 0xFFFF. Otherwise the
// payload bytes, up to the total length, are passed up; Ethernet padding
// behind them is dropped. frame_done (end of the Ethernet frame) returns it
// to READY. kill is high while INVALID, so the receive buffer can discard
// the frame. The states and the reasons for INVALID follow the design; the
// field sizes are those of RFC 791.
module ip_rx
  import nes_net_pkg::*;
#(
  parameter logic [31:0] MY_IP = 32'h0A000002
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        frame_done,
  input  logic        axiiv,
  input  logic [7:0]  axiid,
  output logic        axiov,
  output logic [7:0]  axiod,
  output logic        kill,
  output logic [31:0] src_ip
);
  typedef enum logic [3:0] {
    S_VERSION_IHL, S_DSCP_ECN, S_LENGTH, S_IDENT, S_FRAGS, S_TTL, S_PROTOCOL,
    S_CHECKSUM, S_SOURCE, S_DESTINATION, S_PAYLOAD, S_DONE, S_INVALID
  } state_e;
  state_e state;

  logic [4:0]  idx;          // header byte index 0..19
  logic [7:0]  prev;         // high byte of the current header word
  logic [15:0] sum;
  logic [15:0] total_len;
  logic [15:0] remain;
  logic [23:0] dst;
  logic [15:0] word;
  logic [15:0] sum_next;

  assign word     = {prev, axiid};
  assign sum_next = idx[0] ? one_add(sum, word) : sum;
  assign kill     = (state == S_INVALID);

  always_ff @(posedge clk) begin
    axiov <= 1'b0;
    if (rst || frame_done) begin
      state     <= S_VERSION_IHL;
      idx       <= '0;
      sum       <= '0;
      prev      <= '0;
      total_len <= '0;
      remain    <= '0;
      dst       <= '0;
      if (rst) begin
        src_ip <= '0;
        axiod  <= '0;
      end
    end else if (axiiv) begin
      if (state != S_PAYLOAD && state != S_DONE && state != S_INVALID) begin
        prev <= axiid;
        sum  <= sum_next;
        idx  <= idx + 5'd1;
      end
      case (state)
        S_VERSION_IHL:
          if (axiid[7:4] != 4'd4 || axiid[3:0] != 4'd5) state <= S_INVALID;
          else state <= S_DSCP_ECN;
        S_DSCP_ECN: state <= S_LENGTH;
        S_LENGTH: begin
          if (idx == 5'd2) total_len[15:8] <= axiid;
          else begin
            total_len[7:0] <= axiid;
            state <= S_IDENT;
          end
        end
        S_IDENT: if (idx == 5'd5) state <= S_FRAGS;
        S_FRAGS:
          if (idx == 5'd6 && !axiid[6]) state <= S_INVALID;   // DF clear
          else if (idx == 5'd7) state <= S_TTL;
        S_TTL: state <= S_PROTOCOL;
        S_PROTOCOL:
          if (axiid != IP_PROTO_UDP) state <= S_INVALID;
          else state <= S_CHECKSUM;
        S_CHECKSUM: if (idx == 5'd11) state <= S_SOURCE;
        S_SOURCE: begin
          src_ip <= {src_ip[23:0], axiid};
          if (idx == 5'd15) state <= S_DESTINATION;
        end
        S_DESTINATION: begin
          dst <= {dst[15:0], axiid};
          if (idx == 5'd19) begin
            if ({dst[23:0], axiid} != MY_IP || sum_next != 16'hFFFF ||
                total_len < 16'(IP_HDR_BYTES))
              state <= S_INVALID;
            else if (total_len == 16'(IP_HDR_BYTES))
              state <= S_DONE;
            else begin
              state  <= S_PAYLOAD;
              remain <= total_len - 16'(IP_HDR_BYTES);
            end
          end
        end
        S_PAYLOAD: begin
          axiov  <= 1'b1;
          axiod  <= axiid;
          remain <= remain - 16'd1;
          if (remain == 16'd1) state <= S_DONE;
        end
        default: ;
      endcase
    end
  end
endmodule
