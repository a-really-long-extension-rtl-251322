// net_rx: the receiving network stack, Ethernet -> IPv4 -> UDP -> Data.
//
// Each layer hands its payload bytes to the next one, which only sees bytes
// while the layer below considers them its payload. Ethernet reports done
// and kill (FCS mismatch) when the carrier drops; IPv4 reports kill for a
// header it rejects; UDP reports whether the datagram was complete. The
// Data block holds the frame's data and releases it as 16-bit words on
// axiov/axiod only when the frame ended with no kill from any layer.
// frames_ok / frames_bad count delivered and discarded frames; src_ip is
// the source address of the last IPv4 header received.
// Latency: the first word appears five cycles after the frame's carrier
// drops, then one word per cycle.
module net_rx #(
  parameter int          N     = 2,
  parameter logic [31:0] MY_IP = 32'h0A000002,
  parameter int          DEPTH = 320
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         eth_crsdv,
  input  logic [N-1:0] eth_rxd,
  output logic         axiov,
  output logic [15:0]  axiod,
  output logic [15:0]  frames_ok,
  output logic [15:0]  frames_bad,
  output logic [31:0]  src_ip
);
  logic       e_v, e_done, e_kill;
  logic [2:0] done_d, kill_d;     // done/kill delayed past the layer pipeline
  logic       f_done, f_kill;
  logic [7:0] e_d;
  logic       i_v, i_kill;
  logic [7:0] i_d;
  logic       u_v, u_kill, u_complete;
  logic [7:0] u_d;
  logic       busy;
  logic       d_busy_q;

  ether_rx #(.N(N)) u_eth (
    .clk, .rst, .crsdv(eth_crsdv), .rxd(eth_rxd),
    .axiov(e_v), .axiod(e_d), .done(e_done), .kill(e_kill)
  );

  ip_rx #(.MY_IP(MY_IP)) u_ip (
    .clk, .rst, .frame_done(f_done), .axiiv(e_v), .axiid(e_d),
    .axiov(i_v), .axiod(i_d), .kill(i_kill), .src_ip(src_ip)
  );

  udp_rx u_udp (
    .clk, .rst, .frame_done(f_done), .axiiv(i_v), .axiid(i_d),
    .axiov(u_v), .axiod(u_d), .kill(u_kill), .complete(u_complete)
  );

  rx_data #(.DEPTH(DEPTH)) u_data (
    .clk, .rst, .axiiv(u_v), .axiid(u_d), .done(f_done),
    .kill(f_kill | i_kill | u_kill), .complete(u_complete),
    .axiov, .axiod, .busy, .drops(frames_bad)
  );

  // The last payload byte leaves ether_rx one cycle before done, and each
  // layer adds a register stage, so done reaches the upper layers three
  // cycles later, after that byte.
  always_ff @(posedge clk) begin
    if (rst) begin
      done_d <= '0;
      kill_d <= '0;
    end else begin
      done_d <= {done_d[1:0], e_done};
      kill_d <= {kill_d[1:0], e_kill};
    end
  end
  assign f_done = done_d[2];
  assign f_kill = kill_d[2];

  // a delivered frame is counted when its read-out finishes
  always_ff @(posedge clk) begin
    if (rst) begin
      frames_ok <= '0;
      d_busy_q  <= 1'b0;
    end else begin
      d_busy_q <= busy;
      if (d_busy_q && !busy) frames_ok <= frames_ok + 16'd1;
    end
  end
endmodule
