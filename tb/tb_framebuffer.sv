// tb_framebuffer: writes one whole 320x240 frame plus a few pixels of the
// next on the 50 MHz clock (pixel value derived from its index), then reads
// positions on the 65 MHz clock: each must return the pixel written at
// y*320+x (the wrap overwrote the first ones), and positions outside the
// picture must read black.
`include "tb_common.svh"
module tb_framebuffer;
  `TB_DECLS
  localparam int H = 320, V = 240;
  logic wclk = 0, wrst = 1, wvalid = 0, rclk = 0;
  logic [11:0] wpix = 0, rpix;
  logic [10:0] hcount = 0;
  logic [9:0] vcount = 0;
  always #10 wclk = ~wclk;
  always #7.7 rclk = ~rclk;
  framebuffer #(.H(H), .V(V), .PW(12)) dut (.wclk, .wrst, .wvalid, .wpix, .rclk, .hcount, .vcount, .rpix);

  function automatic logic [11:0] pv(int i);
    return 12'((i * 37) ^ (i >> 7));
  endfunction

  initial begin repeat (400000) @(posedge wclk); failures++; `TB_FINISH end
  initial begin
    int x, y, extra = 100;
    repeat (2) @(posedge wclk); wrst <= 0;
    for (int i = 0; i < H * V + extra; i++) begin
      @(posedge wclk); wvalid <= 1; wpix <= (i >= H * V) ? ~pv(i - H * V) : pv(i);
      if ($urandom_range(0, 3) == 0) begin @(posedge wclk); wvalid <= 0; end
    end
    @(posedge wclk); wvalid <= 0;
    for (int k = 0; k < 400; k++) begin
      x = (k < 300) ? $urandom_range(0, H - 1) : $urandom_range(0, 1023);
      y = (k < 300) ? $urandom_range(0, V - 1) : $urandom_range(0, 767);
      if (k < 10) begin x = k; y = 0; end
      @(posedge rclk); hcount <= 11'(x); vcount <= 10'(y);
      @(posedge rclk); @(posedge rclk);
      if (x < H && y < V)
        `CHECK(rpix == ((y * H + x < extra) ? ~pv(y * H + x) : pv(y * H + x)), $sformatf("(%0d,%0d) %h", x, y, rpix))
      else
        `CHECK(rpix == 12'h000, $sformatf("outside (%0d,%0d) %h", x, y, rpix))
    end
    `TB_FINISH
  end
endmodule
