// nes_controller_model: testbench model of a physical NES controller as
// the design describes it. latch loads the pressed buttons; during the
// latch and until the first pulse the data line shows A; each rising edge
// of pulse (end of its low half) moves to the next button in the order
// A, B, Select, Start, Up, Down, Left, Right. High means pressed.
module nes_controller_model (
  input  logic       latch,
  input  logic       pulse,
  input  logic [7:0] pressed,   // A in bit 7
  output logic       data
);
  int k = 8;
  always @(posedge latch) k = 0;
  always @(posedge pulse) if (!latch && k < 8) k++;
  assign data = latch ? pressed[7] : (k < 8) ? pressed[7 - k] : 1'b0;
endmodule
