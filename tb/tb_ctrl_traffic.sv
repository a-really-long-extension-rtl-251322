// tb_ctrl_traffic: controller traffic at full rate through the network
// stack, board to board over an ideal cable.
// A transmitting stack with the R-side defaults (net_tx) is joined to a
// receiving stack with the N-side defaults (net_rx) and the copy check
// (ctrl_rx_check). 50 controller datagrams, each one word {state, state}
// with a random state, are offered back to back, as fast as ready allows.
// Checked: all 50 arrive and are accepted in order with their state; each
// frame is the 60-byte minimum plus preamble and FCS on the wire
// (72 bytes = 288 cycles); and the frame-to-frame period leaves 20 copies
// well inside one 60 Hz poll period and 1200 datagrams per second well
// inside the link (at most 350 cycles = 7 us per datagram).
`include "tb_common.svh"
module tb_ctrl_traffic;
  `TB_DECLS
  localparam int NPKT = 50;
  logic clk = 0, rst = 1;
  logic axiiv = 0, ready, txen, rx_v;
  logic [15:0] axiid = 0, rx_d, f_ok, f_bad, acc, rej;
  logic [1:0] txd;
  logic [31:0] src_ip;
  logic [7:0] buttons;
  always #10 clk = ~clk;

  net_tx #(.SRC_MAC(48'h0200_0000_0002), .SRC_IP(32'h0A000002), .DST_IP(32'h0A000001)) u_tx (
    .clk, .rst, .axiiv, .axiid, .axii_last(1'b1), .ready, .eth_txen(txen), .eth_txd(txd));
  net_rx #(.MY_IP(32'h0A000001)) u_rx (
    .clk, .rst, .eth_crsdv(txen), .eth_rxd(txd), .axiov(rx_v), .axiod(rx_d),
    .frames_ok(f_ok), .frames_bad(f_bad), .src_ip);
  ctrl_rx_check u_chk (.clk, .rst, .axiiv(rx_v), .axiid(rx_d), .buttons, .accepted(acc), .rejected(rej));

  logic [7:0] sent[$], got[$];
  int cyc = 0, rise[$], len[$], run = 0;
  logic txen_q = 0;
  always @(posedge clk) begin
    cyc++;
    txen_q <= txen;
    if (!rst && txen && !txen_q) rise.push_back(cyc);
    if (rst) run = 0;
    else if (txen) run++;
    else if (txen_q && run > 0) begin len.push_back(run); run = 0; end
    if (rx_v) got.push_back(rx_d[7:0]);
  end

  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin #5ms; failures++; $display("watchdog"); finish(); end

  initial begin
    repeat (4) @(posedge clk); rst <= 0;
    for (int i = 0; i < NPKT; i++) begin
      automatic logic [7:0] s = 8'($urandom);
      sent.push_back(s);
      @(posedge clk); while (!ready) @(posedge clk);
      axiiv <= 1; axiid <= {s, s};
      @(posedge clk); axiiv <= 0;
      @(posedge clk);
    end
    while (f_ok + f_bad < 16'(NPKT)) @(posedge clk);
    repeat (20) @(posedge clk);
    `CHECK(f_ok == 16'(NPKT) && f_bad == 0, $sformatf("frames ok %0d bad %0d", f_ok, f_bad))
    `CHECK(acc == 16'(NPKT) && rej == 0, $sformatf("accepted %0d rejected %0d", acc, rej))
    `CHECK(got == sent, "received states differ from the sent ones")
    `CHECK(src_ip == 32'h0A000002, $sformatf("source address %h", src_ip))
    foreach (len[i]) `CHECK(len[i] == 288, $sformatf("frame %0d is %0d cycles on the wire", i, len[i]))
    begin
      int worst = 0;
      for (int i = 1; i < rise.size(); i++) if (rise[i] - rise[i-1] > worst) worst = rise[i] - rise[i-1];
      `CHECK(rise.size() == NPKT && worst <= 350, $sformatf("%0d frames, worst period %0d cycles", rise.size(), worst))
      `CHECK(20 * worst < 50_000_000 / 60, "20 copies do not fit in one poll period")
      $display("controller datagram period %0d cycles: %0d datagrams/s possible, 1200/s use %0d.%0d%% of the link",
               worst, 50_000_000 / worst, 1200 * worst / 500_000, (1200 * worst / 50_000) % 10);
    end
    finish();
  end
endmodule
