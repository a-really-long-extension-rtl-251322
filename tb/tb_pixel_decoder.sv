// tb_pixel_decoder: random RGB565 pixels; the output one cycle later must
// be the top four bits of red, green and blue.
`include "tb_common.svh"
module tb_pixel_decoder;
  `TB_DECLS
  logic clk = 0, in_valid = 0, out_valid;
  logic [15:0] in_pix = 0;
  logic [11:0] out_pix;
  always #10 clk = ~clk;
  pixel_decoder dut (.clk, .in_valid, .in_pix, .out_valid, .out_pix);
  initial begin repeat (10000) @(posedge clk); failures++; `TB_FINISH end
  initial begin
    logic [15:0] p;
    logic [4:0] r, b;
    logic [5:0] g;
    for (int i = 0; i < 500; i++) begin
      p = 16'($urandom);
      r = p[15:11]; g = p[10:5]; b = p[4:0];
      @(posedge clk); in_valid <= i[0]; in_pix <= p;
      @(posedge clk); @(negedge clk);
      `CHECK(out_pix == {r[4:1], g[5:2], b[4:1]} && out_valid == i[0], $sformatf("pixel %h -> %h", p, out_pix))
    end
    `TB_FINISH
  end
endmodule
