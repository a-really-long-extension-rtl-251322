// tb_crc32_bzip2: feeds byte strings into crc32_bzip2 two bits per clock,
// least significant pair first, and compares the complemented, bit-reversed
// register with the reflected CRC-32 reference (check value of "123456789"
// is 0xCBF43926). It then shifts the FCS in too and checks the residue.
`include "tb_common.svh"
module tb_crc32_bzip2;
  import tb_net_pkg::*;
  `TB_DECLS
  logic clk = 0, rst = 1, clear = 0, valid = 0;
  logic [1:0] d = 0;
  logic [31:0] crc;
  always #5 clk = ~clk;

  crc32_bzip2 #(.N(2)) dut (.clk, .rst, .clear, .valid, .d, .crc);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    `TB_FINISH
  end

  function automatic bit [31:0] rev32(bit [31:0] x);
    bit [31:0] r;
    for (int i = 0; i < 32; i++) r[i] = x[31-i];
    return r;
  endfunction

  task automatic feed(bq_t q);
    foreach (q[i]) for (int k = 0; k < 4; k++) begin
      @(posedge clk); valid <= 1; d <= q[i][2*k +: 2];
    end
    @(posedge clk); valid <= 0;
  endtask

  initial begin
    bq_t q;
    bit [31:0] ref_c;
    @(posedge clk); rst <= 0;
    for (int t = 0; t < 40; t++) begin
      q.delete();
      if (t == 0) for (int i = 0; i < 9; i++) q.push_back(8'(8'h31 + i));
      else repeat (1 + $urandom_range(0, 70)) q.push_back(8'($urandom));
      @(posedge clk); clear <= 1; @(posedge clk); clear <= 0;
      feed(q);
      @(posedge clk);
      ref_c = crc32_ref(q);
      if (t == 0) `CHECK(ref_c == 32'hCBF43926, "reference check value")
      `CHECK(rev32(~crc) == ref_c, $sformatf("crc t=%0d got %h want %h", t, rev32(~crc), ref_c))
      // append the FCS as sent on the wire and check the residue
      q.delete();
      for (int i = 0; i < 4; i++) q.push_back(ref_c[8*i +: 8]);
      feed(q);
      @(posedge clk);
      `CHECK(crc == 32'hC704DD7B, $sformatf("residue t=%0d %h", t, crc))
    end
    `TB_FINISH
  end
endmodule
