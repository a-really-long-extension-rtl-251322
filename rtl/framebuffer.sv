// framebuffer: frame store of the remote FPGA.
//
// A (V*H) x PW dual-port RAM holds one picture. The write port, on the
// Ethernet clock, takes decoded pixels in arrival order: an internal pixel
// counter is the address and wraps to 0 after the last pixel of the frame.
// The read port, on the VGA clock, returns the pixel under the beam
// (hcount, vcount) one cycle later; the H x V picture sits unscaled in the
// top-left corner of the screen and everything outside it reads as black.
// The counter addressing and the two clock domains follow the design; the
// on-screen placement is this implementation's choice.
module framebuffer #(
  parameter int H  = 320,
  parameter int V  = 240,
  parameter int PW = 12
) (
  input  logic          wclk,
  input  logic          wrst,
  input  logic          wvalid,
  input  logic [PW-1:0] wpix,
  input  logic          rclk,
  input  logic [10:0]   hcount,
  input  logic [9:0]    vcount,
  output logic [PW-1:0] rpix
);
  localparam int DEPTH = H * V;
  localparam int AW    = $clog2(DEPTH);

  logic [PW-1:0] mem [DEPTH];
  logic [AW-1:0] waddr;
  logic [AW-1:0] raddr;
  logic          in_pic;

  always_ff @(posedge wclk) begin
    if (wvalid) mem[waddr] <= wpix;
  end

  always_ff @(posedge wclk) begin
    if (wrst) waddr <= '0;
    else if (wvalid) waddr <= (int'(waddr) == DEPTH - 1) ? '0 : waddr + 1'b1;
  end

  assign in_pic = (int'(hcount) < H) && (int'(vcount) < V);
  assign raddr  = in_pic ? AW'(int'(vcount) * H + int'(hcount)) : '0;

  always_ff @(posedge rclk) begin
    rpix <= in_pic ? mem[raddr] : '0;
  end
endmodule
