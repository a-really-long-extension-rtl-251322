// rmii_bfm: testbench model of the far end of a 2-bit RMII link.
// send() puts a frame (preamble and SFD added here) on crsdv/rxd, one
// dibit per clock, least significant pair first. The monitor collects every
// frame seen on txen/txd, strips preamble and SFD, and keeps the bytes in
// frames[]; txen_cycles[] holds how many cycles txen was high for each.
// clear() forgets what was collected (e.g. noise before reset).
module rmii_bfm
  import tb_net_pkg::*;
(
  input  logic       clk,
  output logic       crsdv,
  output logic [1:0] rxd,
  input  logic       txen,
  input  logic [1:0] txd
);
  bq_t frames[$];
  int  txen_cycles[$];
  bit  sfd_ok[$];

  initial begin
    crsdv = 1'b0;
    rxd   = 2'b00;
  end

  task automatic send(bq_t f, int gap = 48);
    bq_t full;
    for (int i = 0; i < 7; i++) full.push_back(8'h55);
    full.push_back(8'hD5);
    foreach (f[i]) full.push_back(f[i]);
    foreach (full[i]) for (int k = 0; k < 4; k++) begin
      @(posedge clk);
      crsdv <= 1'b1;
      rxd   <= full[i][2*k +: 2];
    end
    @(posedge clk);
    crsdv <= 1'b0;
    rxd   <= 2'b00;
    repeat (gap) @(posedge clk);
  endtask

  task automatic clear();
    frames.delete(); txen_cycles.delete(); sfd_ok.delete();
  endtask

  // monitor
  logic [1:0] dib[$];
  int         n;
  always @(posedge clk) begin
    if (txen) begin
      dib.push_back(txd);
      n++;
    end else if (dib.size() != 0) begin
      automatic bq_t b;
      automatic bit ok;
      for (int i = 0; i + 3 < dib.size(); i += 4)
        b.push_back({dib[i+3], dib[i+2], dib[i+1], dib[i]});
      ok = (b.size() >= 8) && (b[7] == 8'hD5);
      for (int i = 0; i < 7 && i < b.size(); i++) if (b[i] != 8'h55) ok = 0;
      for (int i = 0; i < 8 && b.size() > 0; i++) void'(b.pop_front());
      frames.push_back(b);
      txen_cycles.push_back(n);
      sfd_ok.push_back(ok);
      dib.delete();
      n = 0;
    end
  end
endmodule
