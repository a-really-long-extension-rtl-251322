// net_tx: the transmitting network stack (UDP over IPv4 over Ethernet,
// 2-bit RMII).
//
// While ready is high the application writes a datagram as 16-bit words
// (axiiv/axiid); they go into the send buffer (data_store) and, at the
// same time, into data_ck_sum, which keeps their length and one's
// complement sum. The word with axii_last starts the frame on the next
// cycle: the Ethernet, IPv4 and UDP header sources, the data buffer and
// zero padding are put on the wire back to back by tx_pre_mux, the CRC32 is
// computed over the same symbols, and tx_out_mux appends the FCS and the
// inter-frame gap. Both header checksums are complete by the time their
// fields are sent (addresses and data are summed beforehand), so the frame
// is one unbroken stream. ready returns when the gap is over.
// Timing: (22 + 20 + 8 + max(data, 18) + 4) * 8/N cycles of frame plus the gap.
module net_tx #(
  parameter int          N        = 2,
  parameter int          DEPTH    = 320,
  parameter logic [47:0] DST_MAC  = 48'hFFFF_FFFF_FFFF,
  parameter logic [47:0] SRC_MAC  = 48'h0200_0000_0001,
  parameter logic [31:0] SRC_IP   = 32'h0A000001,
  parameter logic [31:0] DST_IP   = 32'h0A000002,
  parameter logic [15:0] SRC_PORT = 16'd4660,
  parameter logic [15:0] DST_PORT = 16'd4660
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         axiiv,
  input  logic [15:0]  axiid,
  input  logic         axii_last,
  output logic         ready,
  output logic         eth_txen,
  output logic [N-1:0] eth_txd
);
  typedef enum logic [1:0] {S_FILL, S_START, S_SEND, S_WAIT} state_e;
  state_e state;

  logic        start;
  logic [15:0] dsum, dbytes, dwords;
  logic [7:0]  eth_b, ip_b, udp_b, data_b;
  logic        eth_l, ip_l, udp_l, data_l;
  logic        n_eth, n_ip, n_udp, n_data;
  logic        ip_inc, udp_inc;
  logic [15:0] ip_cs, udp_cs;
  logic        sym_valid, sym_crc, frame_end, out_busy;
  logic [N-1:0] sym;
  logic [31:0] crc;
  logic        accept;

  assign ready  = (state == S_FILL);
  assign accept = ready && axiiv;
  assign start  = (state == S_START);

  always_ff @(posedge clk) begin
    if (rst) state <= S_FILL;
    else unique case (state)
      S_FILL:  if (accept && axii_last) state <= S_START;
      S_START: state <= S_SEND;
      S_SEND:  if (frame_end) state <= S_WAIT;
      default: if (out_busy == 1'b0) state <= S_FILL;   // FCS and gap done
    endcase
  end

  logic clear_buf;
  assign clear_buf = (state == S_WAIT) && !out_busy;

  data_store #(.DEPTH(DEPTH)) u_store (
    .clk, .rst, .clear(clear_buf), .axiiv(accept), .axiid,
    .rd_start(start), .next(n_data), .byte_o(data_b), .last_o(data_l), .words(dwords)
  );

  data_ck_sum u_dsum (
    .clk, .rst, .clear(clear_buf), .axiiv(accept && int'(dwords) < DEPTH), .axiid,
    .sum(dsum), .bytes(dbytes)
  );

  ether_tx #(.DST_MAC(DST_MAC), .SRC_MAC(SRC_MAC)) u_eth (
    .clk, .rst, .start, .next(n_eth), .byte_o(eth_b), .last_o(eth_l)
  );

  ip_tx #(.SRC_IP(SRC_IP), .DST_IP(DST_IP)) u_ip (
    .clk, .rst, .start, .next(n_ip), .data_bytes(dbytes), .csum(ip_cs),
    .byte_o(ip_b), .last_o(ip_l), .in_csum(ip_inc)
  );

  ip_ck_sum #(.SRC_IP(SRC_IP), .DST_IP(DST_IP)) u_ipcs (
    .clk, .rst, .start, .take(n_ip && !ip_inc), .byte_i(ip_b), .csum(ip_cs)
  );

  udp_tx #(.SRC_PORT(SRC_PORT), .DST_PORT(DST_PORT)) u_udp (
    .clk, .rst, .start, .next(n_udp), .data_bytes(dbytes), .csum(udp_cs),
    .byte_o(udp_b), .last_o(udp_l), .in_csum(udp_inc)
  );

  transport_ck_sum #(.SRC_IP(SRC_IP), .DST_IP(DST_IP)) u_udpcs (
    .clk, .rst, .start, .take(n_udp && !udp_inc), .byte_i(udp_b),
    .data_sum(dsum), .data_bytes(dbytes), .csum(udp_cs)
  );

  tx_pre_mux #(.N(N)) u_pre (
    .clk, .rst, .start,
    .eth_byte(eth_b),   .eth_last(eth_l),   .next_eth(n_eth),
    .ip_byte(ip_b),     .ip_last(ip_l),     .next_ip(n_ip),
    .udp_byte(udp_b),   .udp_last(udp_l),   .next_udp(n_udp),
    .data_byte(data_b), .data_last(data_l), .next_data(n_data),
    .sym_valid, .sym, .sym_crc, .frame_end
  );

  crc32_bzip2 #(.N(N)) u_crc (
    .clk, .rst, .clear(start), .valid(sym_valid && sym_crc), .d(sym), .crc
  );

  tx_out_mux #(.N(N)) u_out (
    .clk, .rst, .sym_valid, .sym, .frame_end, .crc, .eth_txen, .eth_txd, .busy(out_busy)
  );
endmodule
