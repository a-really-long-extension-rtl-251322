// tx_pre_mux: pre-output multiplexer and bit-order converter of the
// transmit stack.
//
// After start it takes bytes from the Ethernet header source, then the IPv4
// header, the UDP header and the data buffer, moving to the next source
// when the current one flags its last byte, and then adds zero bytes until
// the frame (without preamble and FCS) is 60 bytes long, the Ethernet
// minimum. Each byte is sent as 8/N symbols of N bits, least significant
// first, one per clock and without gaps; a next_* strobe tells the source
// its byte was taken. sym_crc marks symbols the FCS covers (all but the
// preamble and SFD) and frame_end the last symbol before the FCS.
// The order of the sources follows the design; the padding is IEEE 802.3's.
module tx_pre_mux
  import nes_net_pkg::*;
#(
  parameter int N = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [7:0]   eth_byte,  input logic eth_last,  output logic next_eth,
  input  logic [7:0]   ip_byte,   input logic ip_last,   output logic next_ip,
  input  logic [7:0]   udp_byte,  input logic udp_last,  output logic next_udp,
  input  logic [7:0]   data_byte, input logic data_last, output logic next_data,
  output logic         sym_valid,
  output logic [N-1:0] sym,
  output logic         sym_crc,
  output logic         frame_end
);
  localparam int SYMS = 8 / N;
  typedef enum logic [2:0] {P_IDLE, P_ETH, P_IP, P_UDP, P_DATA, P_PAD, P_END} phase_e;

  phase_e     phase;
  logic       first;            // cycle after start: load the first byte
  logic       running;
  logic [7:0] sh;
  logic [$clog2(SYMS)-1:0] cnt;
  logic [15:0] nloaded;
  logic [7:0] cur_byte;
  logic       cur_last;
  logic       load;

  always_comb begin
    cur_byte = 8'h00;
    cur_last = 1'b0;
    unique case (phase)
      P_ETH:  begin cur_byte = eth_byte;  cur_last = eth_last;  end
      P_IP:   begin cur_byte = ip_byte;   cur_last = ip_last;   end
      P_UDP:  begin cur_byte = udp_byte;  cur_last = udp_last;  end
      P_DATA: begin cur_byte = data_byte; cur_last = data_last; end
      P_PAD:  begin cur_byte = 8'h00;
                    cur_last = (nloaded + 16'd1 >= 16'(PREAMBLE_BYTES + MIN_FRAME_BYTES)); end
      default: ;
    endcase
  end

  assign load = (first || (running && int'(cnt) == SYMS - 1)) &&
                phase != P_IDLE && phase != P_END;
  assign next_eth  = load && phase == P_ETH;
  assign next_ip   = load && phase == P_IP;
  assign next_udp  = load && phase == P_UDP;
  assign next_data = load && phase == P_DATA;

  assign sym_valid = running;
  assign sym       = sh[N-1:0];
  assign frame_end = running && int'(cnt) == SYMS - 1 && phase == P_END;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase   <= P_IDLE;
      first   <= 1'b0;
      running <= 1'b0;
      sh      <= '0;
      cnt     <= '0;
      nloaded <= '0;
      sym_crc <= 1'b0;
    end else if (start) begin
      phase   <= P_ETH;
      first   <= 1'b1;
      running <= 1'b0;
      nloaded <= '0;
    end else begin
      first <= 1'b0;
      if (load) begin
        sh      <= cur_byte;
        cnt     <= '0;
        running <= 1'b1;
        sym_crc <= (nloaded >= 16'(PREAMBLE_BYTES));
        nloaded <= nloaded + 16'd1;
        if (cur_last) begin
          unique case (phase)
            P_ETH:  phase <= P_IP;
            P_IP:   phase <= P_UDP;
            P_UDP:  phase <= P_DATA;
            P_DATA: phase <= (nloaded + 16'd1 >= 16'(PREAMBLE_BYTES + MIN_FRAME_BYTES))
                             ? P_END : P_PAD;
            default: phase <= P_END;
          endcase
        end
      end else if (running) begin
        sh  <= sh >> N;
        cnt <= cnt + 1'b1;
        if (frame_end) begin
          running <= 1'b0;
          phase   <= P_IDLE;
        end
      end
    end
  end
endmodule
