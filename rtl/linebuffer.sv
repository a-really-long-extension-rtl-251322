// linebuffer: camera line buffer of the NES-side FPGA.
//
// Two 320 x 16 RAMs are used ping-pong. Camera pixels (pix_valid/pix, on
// the camera clock) fill one RAM from address 0; when the 320th pixel is
// written, that RAM is handed to the Ethernet clock domain and filling
// continues in the other one. The Ethernet side reads the handed-over line
// out as 16-bit words with valid/ready (axiov/axiod/ready), axio_last on
// the 320th word, to the network stack. Because each RAM is written in one
// clock domain and read in the other, only the hand-over itself crosses
// domains: a toggle from the camera side announces a full line and a toggle
// back announces that it has been read, both through two-flop
// synchronisers. A line completed while the previous one is still being
// read cannot be handed over; it is dropped and counted (lines_dropped, in
// the camera domain), and filling restarts in the same RAM.
// The ping-pong RAMs and clock split follow the design; the toggle
// hand-over and the drop rule are this implementation's.
module linebuffer #(
  parameter int WIDTH = 320,
  parameter int PW    = 16
) (
  input  logic          cam_clk,
  input  logic          cam_rst,
  input  logic          pix_valid,
  input  logic [PW-1:0] pix,
  output logic [15:0]   lines_dropped,
  input  logic          clk,
  input  logic          rst,
  input  logic          ready,
  output logic          axiov,
  output logic [PW-1:0] axiod,
  output logic          axio_last
);
  localparam int AW = $clog2(WIDTH);

  logic [PW-1:0] mem0 [WIDTH];
  logic [PW-1:0] mem1 [WIDTH];

  // ---------------- camera domain ----------------
  logic          wbank;
  logic [AW-1:0] wcnt;
  logic          line_tgl;          // toggles once per line handed over
  logic          pending;           // a handed-over line is not yet read
  logic [2:0]    done_sync;         // read-done toggle, synchronised
  logic          rd_tgl;            // Ethernet side: toggles once per line read

  always_ff @(posedge cam_clk) begin
    if (pix_valid) begin
      if (wbank) mem1[wcnt] <= pix;
      else       mem0[wcnt] <= pix;
    end
  end

  always_ff @(posedge cam_clk) begin
    if (cam_rst) begin
      wbank         <= 1'b0;
      wcnt          <= '0;
      line_tgl      <= 1'b0;
      pending       <= 1'b0;
      done_sync     <= '0;
      lines_dropped <= '0;
    end else begin
      done_sync <= {done_sync[1:0], rd_tgl};
      if (done_sync[2] != done_sync[1]) pending <= 1'b0;
      if (pix_valid) begin
        if (int'(wcnt) == WIDTH - 1) begin
          wcnt <= '0;
          if (!pending || (done_sync[2] != done_sync[1])) begin
            wbank    <= !wbank;
            line_tgl <= !line_tgl;
            pending  <= 1'b1;
          end else begin
            lines_dropped <= lines_dropped + 16'd1;
          end
        end else begin
          wcnt <= wcnt + 1'b1;
        end
      end
    end
  end

  // ---------------- Ethernet domain ----------------
  logic [2:0]    line_sync;
  logic          rbank;
  logic          active;
  logic [AW-1:0] rcnt;
  logic          issue;

  assign issue = active && (!axiov || ready);

  always_ff @(posedge clk) begin
    if (rst) begin
      line_sync <= '0;
      rd_tgl    <= 1'b0;
      rbank     <= 1'b0;
      active    <= 1'b0;
      rcnt      <= '0;
      axiov     <= 1'b0;
      axiod     <= '0;
      axio_last <= 1'b0;
    end else begin
      line_sync <= {line_sync[1:0], line_tgl};
      if (!active && line_sync[2] != line_sync[1]) begin
        active <= 1'b1;
        rcnt   <= '0;
      end
      if (issue) begin
        axiov     <= 1'b1;
        axiod     <= rbank ? mem1[rcnt] : mem0[rcnt];
        axio_last <= (int'(rcnt) == WIDTH - 1);
        if (int'(rcnt) == WIDTH - 1) begin
          active <= 1'b0;
          rbank  <= !rbank;
          rd_tgl <= !rd_tgl;
        end else begin
          rcnt <= rcnt + 1'b1;
        end
      end else if (ready) begin
        axiov     <= 1'b0;
        axio_last <= 1'b0;
      end
    end
  end
endmodule
