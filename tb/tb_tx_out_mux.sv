// tb_tx_out_mux: plays a symbol stream into tx_out_mux with the CRC
// register value the reference model predicts for it, and checks that
// eth_txd carries the symbols and then the 4 FCS bytes (least significant
// pair first) with eth_txen high throughout, and that busy covers the 16
// FCS cycles and the 48-cycle gap.
`include "tb_common.svh"
module tb_tx_out_mux;
  import tb_net_pkg::*;
  `TB_DECLS
  logic clk = 0, rst = 1, sym_valid = 0, frame_end = 0, eth_txen, busy;
  logic [1:0] sym = 0, eth_txd;
  logic [31:0] crc = 0;
  always #10 clk = ~clk;
  tx_out_mux #(.N(2), .IFG_CYCLES(48)) dut (.clk, .rst, .sym_valid, .sym, .frame_end, .crc,
                                            .eth_txen, .eth_txd, .busy);
  logic [1:0] out[$];
  int idle;
  always @(posedge clk) begin
    if (eth_txen) out.push_back(eth_txd);
    if (busy) idle++;
  end

  function automatic bit [31:0] rev32(bit [31:0] x);
    for (int i = 0; i < 32; i++) rev32[i] = x[31-i];
  endfunction

  initial begin repeat (100000) @(posedge clk); failures++; `TB_FINISH end
  initial begin
    bq_t d, all;
    bit [31:0] c;
    repeat (2) @(posedge clk); rst <= 0;
    for (int r = 0; r < 10; r++) begin
      d.delete(); repeat ($urandom_range(20, 100)) d.push_back(8'($urandom));
      c = crc32_ref(d);
      all = d;
      for (int i = 0; i < 4; i++) all.push_back(c[8*i +: 8]);
      out.delete();
      foreach (d[i]) for (int k = 0; k < 4; k++) begin
        @(posedge clk); sym_valid <= 1; sym <= d[i][2*k +: 2];
        frame_end <= (i == d.size() - 1 && k == 3);
      end
      @(posedge clk); sym_valid <= 0; frame_end <= 0;
      crc <= ~rev32(c);          // register contents after the last symbol
      @(posedge clk); crc <= 32'hDEAD_BEEF;
      idle = 0;
      repeat (16 + 60) @(posedge clk);
      `CHECK(out.size() == 4 * all.size(), $sformatf("r=%0d symbols %0d vs %0d", r, out.size(), 4 * all.size()))
      for (int i = 0; i < out.size() && i < 4 * all.size(); i++)
        `CHECK(out[i] == all[i/4][2*(i%4) +: 2], $sformatf("r=%0d sym %0d", r, i))
      `CHECK(idle == 16 + 48, $sformatf("r=%0d gap %0d", r, idle))
    end
    `TB_FINISH
  end
endmodule
