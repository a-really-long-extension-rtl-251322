// rx_data: receive network buffer (the "Data" block of the receive stack).
//
// UDP data bytes are packed in pairs into 16-bit words, first byte in bits
// 15:8, and written into a DEPTH x 16 buffer as they arrive. Nothing has
// been checked yet at that point: only at the end of the frame (done) is it
// known whether Ethernet or IP killed the frame and whether the UDP datagram
// was complete. A good frame is then read out, one word per cycle on
// axiov/axiod, starting the cycle after done; a bad or oversized frame, or
// one that ends while the previous one is still being read, is discarded
// and counted in drops. An odd final byte is padded with zero.
//
// The next frame may start writing from address 0 while a read-out is in
// progress: the reader moves one word per cycle, the writer at most one word
// per eight cycles (2-bit Ethernet), so the reader always stays ahead.
// The buffer size is the design's 320 words; the pairing, the zero pad and
// the drop rules are this implementation's choices.
module rx_data #(
  parameter int DEPTH = 320
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        axiiv,
  input  logic [7:0]  axiid,
  input  logic        done,
  input  logic        kill,
  input  logic        complete,
  output logic        axiov,
  output logic [15:0] axiod,
  output logic        busy,
  output logic [15:0] drops
);
  localparam int AW = $clog2(DEPTH + 1);

  logic [15:0]   mem [DEPTH];
  logic [AW-1:0] wptr, rptr, rlen;
  logic          half;              // high byte of the current word held
  logic [7:0]    hi;
  logic          overflow;
  logic [AW-1:0] frame_words;

  // words in the finished frame, counting a pending odd byte
  assign frame_words = wptr + AW'(half);

  always_ff @(posedge clk) begin
    if (axiiv && half && !overflow && int'(wptr) < DEPTH)
      mem[wptr] <= {hi, axiid};
    else if (done && half && !overflow && int'(wptr) < DEPTH)
      mem[wptr] <= {hi, 8'h00};
  end

  always_ff @(posedge clk) begin
    if (rst || done) begin
      wptr     <= '0;
      half     <= 1'b0;
      overflow <= 1'b0;
      if (rst) hi <= '0;
    end else if (axiiv) begin
      if (!half) begin
        hi   <= axiid;
        half <= 1'b1;
      end else begin
        half <= 1'b0;
        if (int'(wptr) < DEPTH) wptr <= wptr + 1'b1;
        else overflow <= 1'b1;
      end
      if (!half && int'(wptr) >= DEPTH) overflow <= 1'b1;
    end
  end

  // read side: one registered memory read per cycle while busy
  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      rptr  <= '0;
      rlen  <= '0;
      axiov <= 1'b0;
      axiod <= '0;
      drops <= '0;
    end else begin
      axiov <= 1'b0;
      if (done) begin
        if (kill || !complete || overflow || busy || frame_words == '0)
          drops <= drops + 16'd1;
        else begin
          busy <= 1'b1;
          rptr <= '0;
          rlen <= frame_words;
        end
      end else if (busy) begin
        axiov <= 1'b1;
        axiod <= mem[rptr];
        rptr  <= rptr + 1'b1;
        if (rptr + 1'b1 == rlen) busy <= 1'b0;
      end
    end
  end
endmodule
