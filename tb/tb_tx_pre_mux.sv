// tb_tx_pre_mux: four byte-source models (22, 20, 8 and 1..40 bytes) are
// attached to tx_pre_mux. The symbol stream must be their bytes in order,
// then zero padding to 68 bytes (8 preamble + 60), least significant pair
// first, one symbol per clock with no gap; sym_crc must be low for the
// first 8 bytes only and frame_end must mark the last symbol.
`include "tb_common.svh"
module tb_tx_pre_mux;
  import tb_net_pkg::*;
  `TB_DECLS
  logic clk = 0, rst = 1, start = 0;
  logic [7:0] b[4];
  logic l[4], nx[4];
  logic sym_valid, sym_crc, frame_end;
  logic [1:0] sym;
  always #10 clk = ~clk;

  bq_t src[4];
  int  idx[4];
  always_comb for (int s = 0; s < 4; s++) begin
    b[s] = (idx[s] < src[s].size()) ? src[s][idx[s]] : 8'hEE;
    l[s] = (idx[s] == src[s].size() - 1);
  end
  always @(posedge clk) for (int s = 0; s < 4; s++) if (nx[s]) idx[s]++;

  tx_pre_mux #(.N(2)) dut (.clk, .rst, .start,
    .eth_byte(b[0]), .eth_last(l[0]), .next_eth(nx[0]),
    .ip_byte(b[1]), .ip_last(l[1]), .next_ip(nx[1]),
    .udp_byte(b[2]), .udp_last(l[2]), .next_udp(nx[2]),
    .data_byte(b[3]), .data_last(l[3]), .next_data(nx[3]),
    .sym_valid, .sym, .sym_crc, .frame_end);

  logic [1:0] syms[$];
  bit crcs[$];
  int fe_at, gaps;
  always @(posedge clk) if (sym_valid) begin
    syms.push_back(sym); crcs.push_back(sym_crc);
    if (frame_end) fe_at = syms.size();
  end

  initial begin repeat (100000) @(posedge clk); failures++; `TB_FINISH end
  initial begin
    bq_t all;
    int first, lastv;
    repeat (2) @(posedge clk); rst <= 0;
    for (int r = 0; r < 8; r++) begin
      int sizes[4] = '{22, 20, 8, 1};
      sizes[3] = (r == 0) ? 1 : (r == 1) ? 10 : $urandom_range(1, 60);
      all.delete();
      for (int s = 0; s < 4; s++) begin
        src[s].delete(); idx[s] = 0;
        repeat (sizes[s]) src[s].push_back(8'($urandom));
        foreach (src[s][i]) all.push_back(src[s][i]);
      end
      while (all.size() < 68) all.push_back(8'h00);
      syms.delete(); crcs.delete(); fe_at = 0;
      @(posedge clk); start <= 1; @(posedge clk); start <= 0;
      first = -1; lastv = 0; gaps = 0;
      for (int c = 0; c < 4 * all.size() + 20; c++) begin
        @(posedge clk);
        if (sym_valid) begin if (first < 0) first = c; lastv = c; end
      end
      `CHECK(syms.size() == 4 * all.size(), $sformatf("r=%0d symbols %0d vs %0d", r, syms.size(), 4 * all.size()))
      `CHECK(lastv - first + 1 == 4 * all.size(), "symbols not contiguous")
      `CHECK(fe_at == 4 * all.size(), $sformatf("frame_end at %0d", fe_at))
      for (int i = 0; i < syms.size() && i < 4 * all.size(); i++) begin
        `CHECK(syms[i] == all[i/4][2*(i%4) +: 2], $sformatf("r=%0d sym %0d", r, i))
        `CHECK(crcs[i] == (i >= 32), $sformatf("r=%0d crc flag %0d", r, i))
      end
    end
    `TB_FINISH
  end
endmodule
