// ctrl_repeat_tx: turns controller changes into datagrams for the network
// stack of the remote FPGA.
//
// Each time changed pulses, the new button state is latched and COPIES
// one-word datagrams are queued, each word carrying the 8-bit state twice
// ({buttons, buttons}) so the receiver can tell a corrupted copy. A word is
// offered with axiov (and axio_last, as each datagram is one word) and is
// taken when ready is high. A change arriving during a burst restarts the
// burst with the newer state. sent counts datagrams handed over.
// The 20 copies and the doubled byte follow the design.
module ctrl_repeat_tx #(
  parameter int COPIES = 20
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  buttons,
  input  logic        changed,
  input  logic        ready,
  output logic        axiov,
  output logic [15:0] axiod,
  output logic        axio_last,
  output logic [15:0] sent
);
  logic [7:0]  state_q;
  logic [$clog2(COPIES + 1)-1:0] remaining;

  assign axiov     = (remaining != '0);
  assign axiod     = {state_q, state_q};
  assign axio_last = axiov;

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q   <= '0;
      remaining <= '0;
      sent      <= '0;
    end else if (changed) begin
      state_q   <= buttons;
      remaining <= ($bits(remaining))'(COPIES);
    end else if (axiov && ready) begin
      remaining <= remaining - 1'b1;
      sent      <= sent + 16'd1;
    end
  end
endmodule
