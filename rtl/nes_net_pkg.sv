// nes_net_pkg: constants and helpers shared by the network stack and the
// controller path of the NES remote-play link.
//
// The stack speaks Ethernet II / IPv4 / UDP over a 2-bit RMII interface.
// one_add() is the 16-bit one's complement addition with end-around carry
// used by the IPv4 header checksum and the UDP checksum alike.
package nes_net_pkg;

  localparam logic [15:0] ETHERTYPE_IPV4 = 16'h0800;
  localparam logic [7:0]  IP_PROTO_UDP   = 8'd17;
  localparam int          IP_HDR_BYTES   = 20;
  localparam int          UDP_HDR_BYTES  = 8;
  localparam int          ETH_HDR_BYTES  = 14;   // dst MAC, src MAC, EtherType
  localparam int          PREAMBLE_BYTES = 8;    // 7 x 0x55 then SFD 0xD5
  localparam int          MIN_FRAME_BYTES = 60;  // before the FCS
  // CRC register value after a correct frame and its FCS have been shifted in
  localparam logic [31:0] CRC_RESIDUE    = 32'hC704DD7B;

  // Button bit positions in the 8-bit controller state (A is read first).
  typedef enum logic [2:0] {
    BTN_RIGHT = 3'd0, BTN_LEFT = 3'd1, BTN_DOWN = 3'd2, BTN_UP = 3'd3,
    BTN_START = 3'd4, BTN_SELECT = 3'd5, BTN_B = 3'd6, BTN_A = 3'd7
  } button_e;

  function automatic logic [15:0] one_add(input logic [15:0] a, input logic [15:0] b);
    logic [16:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[15:0] + {15'd0, s[16]};
  endfunction

  // One's complement sum of the two halves of a 32-bit value.
  function automatic logic [15:0] sum32(input logic [31:0] v);
    return one_add(v[31:16], v[15:0]);
  endfunction

endpackage
