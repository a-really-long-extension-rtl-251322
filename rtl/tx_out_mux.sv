// tx_out_mux: output multiplexer of the transmit stack, drives the RMII
// transmit pins.
//
// While the pre-output multiplexer delivers symbols they are registered onto
// eth_txd with eth_txen high. After the frame's last symbol the CRC register
// holds the complete frame, and its complement is sent, bit 31 first, as the
// 32-bit FCS (32/N more cycles) right behind the data. Then eth_txen drops
// and the line is held idle for IFG_CYCLES (the 96-bit inter-frame gap).
// busy is high from the first FCS cycle to the end of the gap.
module tx_out_mux #(
  parameter int N          = 2,
  parameter int IFG_CYCLES = 96 / N
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         sym_valid,
  input  logic [N-1:0] sym,
  input  logic         frame_end,
  input  logic [31:0]  crc,
  output logic         eth_txen,
  output logic [N-1:0] eth_txd,
  output logic         busy
);
  localparam int FCS_SYMS = 32 / N;
  typedef enum logic [1:0] {S_DATA, S_FCS, S_GAP} state_e;
  state_e state;
  logic [31:0] fcs_sh;
  logic [$clog2(FCS_SYMS + IFG_CYCLES + 1)-1:0] k;

  function automatic logic [N-1:0] top_bits(input logic [31:0] x);
    logic [N-1:0] r;
    for (int i = 0; i < N; i++) r[i] = ~x[31 - i];
    return r;
  endfunction

  assign busy = (state != S_DATA);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_DATA;
      eth_txen <= 1'b0;
      eth_txd  <= '0;
      fcs_sh   <= '0;
      k        <= '0;
    end else begin
      unique case (state)
        S_DATA: begin
          eth_txen <= sym_valid;
          eth_txd  <= sym_valid ? sym : '0;
          if (frame_end) begin
            state <= S_FCS;
            k     <= '0;
          end
        end
        S_FCS: begin
          eth_txen <= 1'b1;
          if (k == '0) begin
            eth_txd <= top_bits(crc);
            fcs_sh  <= crc << N;
          end else begin
            eth_txd <= top_bits(fcs_sh);
            fcs_sh  <= fcs_sh << N;
          end
          k <= k + 1'b1;
          if (int'(k) == FCS_SYMS - 1) begin
            state <= S_GAP;
            k     <= '0;
          end
        end
        default: begin
          eth_txen <= 1'b0;
          eth_txd  <= '0;
          k <= k + 1'b1;
          if (int'(k) == IFG_CYCLES - 1) state <= S_DATA;
        end
      endcase
    end
  end
endmodule
