// tb_rx_data: writes byte streams into the receive buffer and ends each
// frame with done. Good frames must be read out as big-endian words, one
// per cycle starting right after done (odd length padded with zero);
// killed, incomplete and oversize frames must produce nothing and count a
// drop. The next frame's bytes arrive while the previous one is read out.
`include "tb_common.svh"
module tb_rx_data;
  `TB_DECLS
  localparam int DEPTH = 320;
  logic clk = 0, rst = 1, axiiv = 0, done = 0, kill = 0, complete = 0;
  logic [7:0] axiid = 0;
  logic axiov, busy;
  logic [15:0] axiod, drops;
  always #10 clk = ~clk;

  rx_data #(.DEPTH(DEPTH)) dut (.clk, .rst, .axiiv, .axiid, .done, .kill, .complete,
                                .axiov, .axiod, .busy, .drops);

  logic [15:0] got[$];
  int first_cycle, cyc, done_cycle;
  always @(posedge clk) begin
    cyc++;
    if (axiov) begin
      if (got.size() == 0) first_cycle = cyc;
      got.push_back(axiod);
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  task automatic frame(byte unsigned b[$], bit k, bit c);
    foreach (b[i]) begin
      @(posedge clk); axiiv <= 1; axiid <= b[i];
      @(posedge clk); axiiv <= 0;
      repeat (6) @(posedge clk);
    end
    @(posedge clk); done <= 1; kill <= k; complete <= c; done_cycle = cyc + 1;
    @(posedge clk); done <= 0; kill <= 0; complete <= 0;
  endtask

  initial begin
    byte unsigned b[$];
    logic [15:0] exp[$];
    int d0;
    repeat (3) @(posedge clk); rst <= 0;
    for (int t = 0; t < 10; t++) begin
      automatic int len = (t == 9) ? 2 * DEPTH + 2 : $urandom_range(1, 2 * DEPTH);
      automatic bit k = (t == 4), c = (t != 6);
      b.delete(); exp.delete();
      repeat (len) b.push_back(8'($urandom));
      for (int i = 0; i < len; i += 2) exp.push_back({b[i], (i + 1 < len) ? b[i+1] : 8'h00});
      got.delete();
      d0 = drops;
      frame(b, k, c);
      repeat (DEPTH + 5) @(posedge clk);
      if (k || !c || t == 9) begin
        `CHECK(got.size() == 0 && drops == d0 + 1, $sformatf("t=%0d bad frame delivered %0d %0d %0d", t, got.size(), drops, d0))
      end else begin
        `CHECK(got == exp, $sformatf("t=%0d words %0d vs %0d", t, got.size(), exp.size()))
        `CHECK(first_cycle == done_cycle + 3, $sformatf("t=%0d latency %0d", t, first_cycle - done_cycle))
      end
    end
    `TB_FINISH
  end
endmodule
