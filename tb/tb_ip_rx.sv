// tb_ip_rx: streams IPv4 packets from the reference model into ip_rx, one
// byte every fourth clock as the 2-bit Ethernet layer delivers them, with
// Ethernet padding behind. Good packets must yield exactly their payload
// and no kill; each rejection reason (version, header length, fragmenting
// allowed, protocol, destination, checksum) must give kill and no payload.
`include "tb_common.svh"
module tb_ip_rx;
  import tb_net_pkg::*;
  `TB_DECLS
  localparam logic [31:0] ME = 32'h0A000002;
  logic clk = 0, rst = 1, frame_done = 0, axiiv = 0, axiov, kill;
  logic [7:0] axiid = 0, axiod;
  logic [31:0] src_ip;
  always #10 clk = ~clk;

  ip_rx #(.MY_IP(ME)) dut (.clk, .rst, .frame_done, .axiiv, .axiid, .axiov, .axiod, .kill, .src_ip);

  bq_t got;
  always @(posedge clk) if (axiov) got.push_back(axiod);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  task automatic run(bq_t p, int pad, output bit k);
    foreach (p[i]) begin
      @(posedge clk); axiiv <= 1; axiid <= p[i];
      @(posedge clk); axiiv <= 0;
      repeat (2) @(posedge clk);
    end
    repeat (pad) begin @(posedge clk); axiiv <= 1; axiid <= 8'hAA; @(posedge clk); axiiv <= 0; end
    @(posedge clk);
    k = kill;
    frame_done <= 1; @(posedge clk); frame_done <= 0; @(posedge clk);
  endtask

  initial begin
    bq_t d, p;
    bit k;
    repeat (3) @(posedge clk); rst <= 0;
    for (int t = 0; t < 16; t++) begin
      automatic int kind = (t < 6) ? 0 : (t - 6) % 7;   // 0 good, 1..6 bad kinds
      d.delete(); repeat ($urandom_range(0, 60)) d.push_back(8'($urandom));
      unique case (kind)
        1: p = ip_udp(32'h0A000001, ME, 16'(t), d, .ver_ihl(8'h65));
        2: p = ip_udp(32'h0A000001, ME, 16'(t), d, .ver_ihl(8'h46));
        3: p = ip_udp(32'h0A000001, ME, 16'(t), d, .df(1'b0));
        4: p = ip_udp(32'h0A000001, ME, 16'(t), d, .proto(8'd6));
        5: p = ip_udp(32'h0A000001, 32'h0A000009, 16'(t), d);
        6: p = ip_udp(32'h0A000001, ME, 16'(t), d, .bad_csum(1'b1));
        default: p = ip_udp(32'h0A000001 + t, ME, 16'(t), d);
      endcase
      got.delete();
      run(p, $urandom_range(0, 20), k);
      if (kind == 0) begin
        `CHECK(!k, $sformatf("t=%0d good packet killed", t))
        `CHECK(got == p[20:$], $sformatf("t=%0d payload %0d vs %0d", t, got.size(), p.size() - 20))
        `CHECK(src_ip == 32'h0A000001 + t, "source address")
      end else begin
        `CHECK(k, $sformatf("t=%0d kind %0d not killed", t, kind))
        `CHECK(got.size() == 0, $sformatf("t=%0d kind %0d passed payload", t, kind))
      end
    end
    `TB_FINISH
  end
endmodule
