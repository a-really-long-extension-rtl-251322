// ether_rx: Ethernet receive layer for an RMII PHY (N bits per 50 MHz clock).
//
// It waits for the preamble (dibits 2'b01) and the final 2'b11 of the SFD,
// then assembles bytes least significant dibit first and feeds every dibit
// after the SFD into crc32_bzip2. The first 14 bytes (destination MAC,
// source MAC, EtherType) are consumed here; the rest of the frame is passed
// up one byte per axiov pulse. Because the last four bytes are the FCS and
// that is only known when the carrier drops, each byte is held back until
// four newer bytes have arrived, so the FCS is never passed up.
//
// When crsdv falls, done pulses for one cycle; kill is high with it if the
// CRC register does not hold the 802.3 residue (the received FCS does not
// match the computed one), the frame is not a whole number of bytes, or it
// is shorter than a header plus FCS. The FCS check, done/kill reporting and
// 2-bit operation follow the design; the residue-based comparison and the
// hold-back buffer are this implementation's way of doing it.
module ether_rx
  import nes_net_pkg::*;
#(
  parameter int N = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         crsdv,
  input  logic [N-1:0] rxd,
  output logic         axiov,
  output logic [7:0]   axiod,
  output logic         done,
  output logic         kill
);
  localparam int SYMS = 8 / N;               // symbols per byte
  localparam logic [N-1:0] PRE_SYM = N'(8'h55);
  localparam logic [N-1:0] SFD_END = N'(8'hD5 >> (8 - N));

  typedef enum logic [1:0] {S_IDLE, S_PRE, S_DATA} state_e;
  state_e state;

  logic [$clog2(SYMS+1)-1:0] sym_cnt;
  logic [7:0]   cur;
  logic [31:0]  hold;          // last four complete bytes, oldest in 31:24
  logic [15:0]  nbytes;
  logic [31:0]  crc;
  logic         crc_clear, crc_en;
  logic [7:0]   nb;            // byte completed this cycle

  assign crc_clear = (state != S_DATA);
  assign crc_en    = (state == S_DATA) && crsdv;

  crc32_bzip2 #(.N(N)) u_crc (
    .clk, .rst, .clear(crc_clear), .valid(crc_en), .d(rxd), .crc
  );

  always_comb begin
    nb = cur;
    nb[int'(sym_cnt)*N +: N] = rxd;
  end

  always_ff @(posedge clk) begin
    axiov <= 1'b0;
    done  <= 1'b0;
    kill  <= 1'b0;
    if (rst) begin
      state   <= S_IDLE;
      sym_cnt <= '0;
      cur     <= '0;
      hold    <= '0;
      nbytes  <= '0;
      axiod   <= '0;
    end else begin
      case (state)
        S_IDLE: if (crsdv && rxd == PRE_SYM) state <= S_PRE;
        S_PRE: begin
          if (!crsdv)              state <= S_IDLE;
          else if (rxd == SFD_END) state <= S_DATA;
          sym_cnt <= '0;
          nbytes  <= '0;
        end
        S_DATA: begin
          if (crsdv) begin
            cur <= nb;
            if (int'(sym_cnt) == SYMS - 1) begin
              sym_cnt <= '0;
              hold    <= {hold[23:0], nb};
              if (nbytes != 16'hFFFF) nbytes <= nbytes + 16'd1;
              if (nbytes >= 16'(4 + ETH_HDR_BYTES)) begin
                axiov <= 1'b1;
                axiod <= hold[31:24];
              end
            end else begin
              sym_cnt <= sym_cnt + 1'b1;
            end
          end else begin
            state <= S_IDLE;
            done  <= 1'b1;
            kill  <= (crc != CRC_RESIDUE) || (sym_cnt != '0) ||
                     (nbytes < 16'(ETH_HDR_BYTES + 4));
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
