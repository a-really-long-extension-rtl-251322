// vga_timing: display timing generator for the remote FPGA's VGA output.
//
// hcount runs 0 .. H_TOTAL-1 every clock and vcount steps at the end of
// each line; hsync and vsync are active low during their sync intervals and
// blank is high outside the H_ACTIVE x V_ACTIVE picture. The defaults are
// the standard 1024 x 768 at 60 Hz timing, whose pixel clock is the 65 MHz
// the design's VGA side runs at; the timing itself is not part of the design
// description and is taken from that standard.
module vga_timing #(
  parameter int H_ACTIVE = 1024,
  parameter int H_FP     = 24,
  parameter int H_SYNC   = 136,
  parameter int H_BP     = 160,
  parameter int V_ACTIVE = 768,
  parameter int V_FP     = 3,
  parameter int V_SYNC   = 6,
  parameter int V_BP     = 29
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);
  localparam int H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (int'(hcount) == H_TOTAL - 1) begin
      hcount <= '0;
      vcount <= (int'(vcount) == V_TOTAL - 1) ? '0 : vcount + 1'b1;
    end else begin
      hcount <= hcount + 1'b1;
    end
  end

  assign hsync = !(int'(hcount) >= H_ACTIVE + H_FP && int'(hcount) < H_ACTIVE + H_FP + H_SYNC);
  assign vsync = !(int'(vcount) >= V_ACTIVE + V_FP && int'(vcount) < V_ACTIVE + V_FP + V_SYNC);
  assign blank = (int'(hcount) >= H_ACTIVE) || (int'(vcount) >= V_ACTIVE);
endmodule
