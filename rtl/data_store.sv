// data_store: send network buffer of the transmit stack.
//
// The application writes 16-bit words (axiiv/axiid) into a DEPTH x 16 RAM
// at consecutive addresses from 0; clear rewinds the write address for the
// next datagram, and words beyond DEPTH are ignored. For sending, rd_start
// rewinds the read side and the RAM is then offered one byte at a time,
// high byte first, with the same start/next/byte_o/last_o interface as the
// header sources. The RAM read is registered (block RAM style); next comes
// at most once every four cycles, so the word is always ready in time.
// The depth is the 320-word buffer of the design, enough for one
// 320-pixel line of 16-bit pixels.
module data_store #(
  parameter int DEPTH = 320
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        clear,
  input  logic        axiiv,
  input  logic [15:0] axiid,
  input  logic        rd_start,
  input  logic        next,
  output logic [7:0]  byte_o,
  output logic        last_o,
  output logic [15:0] words
);
  localparam int AW = $clog2(DEPTH + 1);

  logic [15:0]   mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [15:0]   q;
  logic          lo;          // low byte of the word is offered

  always_ff @(posedge clk) begin
    if (axiiv && int'(wptr) < DEPTH) mem[wptr] <= axiid;
    if (int'(rptr) < DEPTH) q <= mem[rptr];
  end

  always_ff @(posedge clk) begin
    if (rst || clear)                            wptr <= '0;
    else if (axiiv && int'(wptr) < DEPTH)        wptr <= wptr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst || rd_start) begin
      rptr <= '0;
      lo   <= 1'b0;
    end else if (next) begin
      lo <= !lo;
      if (lo) rptr <= rptr + 1'b1;
    end
  end

  assign byte_o = lo ? q[7:0] : q[15:8];
  assign last_o = lo && (rptr + 1'b1 == wptr);
  assign words  = 16'(wptr);
endmodule
