// udp_rx: UDP receive layer.
//
// Counts off the 8-byte UDP header (source port, destination port, length,
// checksum), takes the length field, and passes the following length-8
// bytes up one per axiov. complete goes high once all of them have been
// seen; kill is high if the length field is below the header size. Ports
// and the UDP checksum are not checked here (only two endpoints talk, and
// the Ethernet FCS and IPv4 header checksum are checked below). frame_done
// returns it to the header state for the next frame.
module udp_rx
  import nes_net_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       frame_done,
  input  logic       axiiv,
  input  logic [7:0] axiid,
  output logic       axiov,
  output logic [7:0] axiod,
  output logic       kill,
  output logic       complete
);
  typedef enum logic [1:0] {S_HEADER, S_DATA, S_END, S_BAD} state_e;
  state_e state;

  logic [2:0]  idx;
  logic [15:0] len;
  logic [15:0] remain;

  assign kill     = (state == S_BAD);
  assign complete = (state == S_END);

  always_ff @(posedge clk) begin
    axiov <= 1'b0;
    if (rst || frame_done) begin
      state  <= S_HEADER;
      idx    <= '0;
      len    <= '0;
      remain <= '0;
      if (rst) axiod <= '0;
    end else if (axiiv) begin
      case (state)
        S_HEADER: begin
          idx <= idx + 3'd1;
          if (idx == 3'd4) len[15:8] <= axiid;
          if (idx == 3'd5) len[7:0]  <= axiid;
          if (idx == 3'd7) begin
            if (len < 16'(UDP_HDR_BYTES)) state <= S_BAD;
            else if (len == 16'(UDP_HDR_BYTES)) state <= S_END;
            else begin
              state  <= S_DATA;
              remain <= len - 16'(UDP_HDR_BYTES);
            end
          end
        end
        S_DATA: begin
          axiov  <= 1'b1;
          axiod  <= axiid;
          remain <= remain - 16'd1;
          if (remain == 16'd1) state <= S_END;
        end
        default: ;
      endcase
    end
  end
endmodule
