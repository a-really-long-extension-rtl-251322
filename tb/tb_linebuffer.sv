// tb_linebuffer: camera clock 16.67 MHz (60 ns), Ethernet clock 50 MHz.
// Lines of random pixels are written; every line handed over must come out
// on the Ethernet side in order, 320 words with axio_last on the last,
// while ready is toggled at random (stall). When the reader is held off for
// longer than a line time, the line completed meanwhile must be dropped
// and counted, and the next lines must still come through intact.
`include "tb_common.svh"
module tb_linebuffer;
  `TB_DECLS
  localparam int W = 320;
  logic cam_clk = 0, cam_rst = 1, pix_valid = 0, clk = 0, rst = 1, ready = 0;
  logic [15:0] pix = 0, axiod, lines_dropped;
  logic axiov, axio_last;
  always #30 cam_clk = ~cam_clk;
  always #10 clk = ~clk;

  linebuffer #(.WIDTH(W), .PW(16)) dut (.cam_clk, .cam_rst, .pix_valid, .pix, .lines_dropped,
    .clk, .rst, .ready, .axiov, .axiod, .axio_last);

  logic [15:0] got[$];
  int lasts, last_pos_ok = 1;
  bit hold = 0, stall_seen = 0;
  always @(posedge clk) begin
    ready <= hold ? 1'b0 : ($urandom_range(0, 3) != 0);
    if (axiov && ready) begin
      got.push_back(axiod);
      if (axio_last) begin lasts++; if (got.size() % W != 0) last_pos_ok = 0; end
    end
    if (axiov && !ready) stall_seen = 1;
  end

  initial begin repeat (400000) @(posedge clk); failures++; $display("watchdog"); `TB_FINISH end

  task automatic line(ref logic [15:0] exp[$], input bit keep);
    for (int i = 0; i < W; i++) begin
      automatic logic [15:0] p = 16'($urandom);
      @(posedge cam_clk); pix_valid <= 1; pix <= p;
      if (keep) exp.push_back(p);
    end
    @(posedge cam_clk); pix_valid <= 0;
    repeat (400) @(posedge cam_clk);   // horizontal blanking
  endtask

  initial begin
    logic [15:0] exp[$];
    repeat (4) @(posedge cam_clk); cam_rst <= 0; rst <= 0;
    repeat (4) @(posedge cam_clk);
    for (int i = 0; i < 4; i++) line(exp, 1);
    // hold the reader: line A is handed over but not read, line B is dropped
    repeat (200) @(posedge cam_clk);
    hold = 1;
    line(exp, 1);
    line(exp, 0);
    hold = 0;
    repeat (2000) @(posedge cam_clk);
    for (int i = 0; i < 3; i++) line(exp, 1);
    repeat (2000) @(posedge cam_clk);
    `CHECK(got.size() == exp.size(), $sformatf("words %0d vs %0d", got.size(), exp.size()))
    `CHECK(got == exp, "pixel data")
    `CHECK(lasts == exp.size() / W && last_pos_ok == 1, $sformatf("axio_last count %0d", lasts))
    `CHECK(lines_dropped == 16'd1, $sformatf("dropped %0d", lines_dropped))
    `CHECK(stall_seen, "no stall happened")
    `TB_FINISH
  end
endmodule
