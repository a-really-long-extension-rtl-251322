// tb_udp_rx: streams UDP datagrams (header from the reference model, then
// padding) into udp_rx and checks that exactly length-8 data bytes come out
// and complete is set; a datagram cut short is not complete, and a length
// field below 8 gives kill.
`include "tb_common.svh"
module tb_udp_rx;
  import tb_net_pkg::*;
  `TB_DECLS
  logic clk = 0, rst = 1, frame_done = 0, axiiv = 0, axiov, kill, complete;
  logic [7:0] axiid = 0, axiod;
  always #10 clk = ~clk;

  udp_rx dut (.clk, .rst, .frame_done, .axiiv, .axiid, .axiov, .axiod, .kill, .complete);

  bq_t got;
  always @(posedge clk) if (axiov) got.push_back(axiod);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  task automatic run(bq_t p, output bit k, output bit c);
    foreach (p[i]) begin
      @(posedge clk); axiiv <= 1; axiid <= p[i];
      @(posedge clk); axiiv <= 0;
    end
    @(posedge clk); @(posedge clk);
    k = kill; c = complete;
    frame_done <= 1; @(posedge clk); frame_done <= 0; @(posedge clk);
  endtask

  initial begin
    bq_t d, p;
    bit k, c;
    repeat (3) @(posedge clk); rst <= 0;
    for (int t = 0; t < 12; t++) begin
      d.delete(); repeat ($urandom_range(0, 100)) d.push_back(8'($urandom));
      p = ip_udp(32'h1, 32'h2, 16'h0, d);
      p = p[20:$];
      got.delete();
      if (t == 10) begin          // truncated
        void'(p.pop_back());
        if (d.size() == 0) begin p[5] = 8'd9; end
        run(p, k, c);
        `CHECK(!c, "truncated datagram reported complete")
      end else if (t == 11) begin // bad length
        p[4] = 8'h00; p[5] = 8'h05;
        run(p, k, c);
        `CHECK(k && got.size() == 0, "short length not killed")
      end else begin
        repeat ($urandom_range(0, 10)) p.push_back(8'h5A);   // padding
        run(p, k, c);
        `CHECK(c && !k, $sformatf("t=%0d not complete", t))
        `CHECK(got == d, $sformatf("t=%0d data %0d vs %0d", t, got.size(), d.size()))
      end
    end
    `TB_FINISH
  end
endmodule
