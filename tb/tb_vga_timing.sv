// tb_vga_timing: runs a little over one 1024x768 frame and measures, from
// the outputs only, the line length (1344), hsync low width (136) and its
// position after the active area (1024 + 24), blank width per line, the
// frame length (806 lines) and vsync width (6 lines).
`include "tb_common.svh"
module tb_vga_timing;
  `TB_DECLS
  logic clk = 0, rst = 1, hsync, vsync, blank;
  logic [10:0] hcount;
  logic [9:0] vcount;
  always #7.7 clk = ~clk;
  vga_timing dut (.clk, .rst, .hcount, .vcount, .hsync, .vsync, .blank);
  initial begin repeat (1200000) @(posedge clk); failures++; `TB_FINISH end
  initial begin
    int c = 0, last_hs_fall = -1, hs_low = 0, vs_fall_line = -1, lines = 0, vs_lines = 0;
    int blank_on_line = 0, line_start = 0;
    logic hs_q = 1, vs_q = 1;
    int nline_checks = 0;
    repeat (2) @(posedge clk); rst <= 0;
    @(posedge clk);
    while (c < 1344 * 806 + 5000) begin
      @(posedge clk); #1;
      c++;
      if (hs_q && !hsync) begin
        if (last_hs_fall >= 0 && nline_checks < 50) begin
          `CHECK(c - last_hs_fall == 1344, $sformatf("line length %0d", c - last_hs_fall))
          nline_checks++;
        end
        last_hs_fall = c;
        `CHECK(hcount == 11'(1024 + 24), $sformatf("hsync starts at %0d", hcount))
        lines++;
        if (!vsync) vs_lines++;
      end
      if (!hs_q && hsync && nline_checks < 50) `CHECK(c - last_hs_fall == 136, "hsync width")
      if (vs_q && !vsync) vs_fall_line = lines;
      hs_q = hsync; vs_q = vsync;
      if (vcount == 10'd10 && hcount == 11'd1023) `CHECK(!blank, "active area blanked")
      if (vcount == 10'd10 && hcount == 11'd1024) `CHECK(blank, "not blanked after active")
      if (vcount == 10'd770 && hcount == 11'd5) `CHECK(blank, "vertical blank")
    end
    `CHECK(vs_lines == 6, $sformatf("vsync lines %0d", vs_lines))
    `CHECK(lines >= 806, $sformatf("lines %0d", lines))
    `TB_FINISH
  end
endmodule
