// crc32_bzip2: Ethernet frame check sequence generator, N bits per clock.
//
// The register is the CRC32-BZIP2 form (polynomial 0x04C11DB7, shifted MSB
// first, preset to all ones). Bits are fed in the order they travel on the
// wire, d[0] first, which makes the register equal to the IEEE 802.3 FCS
// computation: the transmitter sends ~crc bit 31 first, and a receiver that
// shifts the whole frame including its FCS ends on the constant residue
// CRC_RESIDUE when the frame is intact. N = 2 matches the RMII interface.
//
// Interface: clear (or rst) presets the register; valid shifts in the N bits
// of d on the rising edge. crc is the register, available the next cycle.
module crc32_bzip2 #(
  parameter int N = 2
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,
  input  logic          valid,
  input  logic [N-1:0]  d,
  output logic [31:0]   crc
);
  localparam logic [31:0] POLY = 32'h04C11DB7;

  function automatic logic [31:0] step(input logic [31:0] c, input logic [N-1:0] bits);
    logic [31:0] r;
    r = c;
    for (int i = 0; i < N; i++) begin
      if (r[31] ^ bits[i]) r = {r[30:0], 1'b0} ^ POLY;
      else                 r = {r[30:0], 1'b0};
    end
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (rst || clear) crc <= '1;
    else if (valid)   crc <= step(crc, d);
  end
endmodule
