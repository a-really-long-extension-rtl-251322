// pixel_decoder: converts a 16-bit camera pixel to the 12-bit colour the
// VGA output uses. The pixel is taken as RGB565 and the four most
// significant bits of each colour are kept: out = {R[4:1], G[5:2], B[4:1]}.
// One register stage: out_valid/out_pix follow in_valid/in_pix by a cycle.
// The 16-to-12-bit conversion is the design's; the RGB565 layout is assumed.
module pixel_decoder (
  input  logic        clk,
  input  logic        in_valid,
  input  logic [15:0] in_pix,
  output logic        out_valid,
  output logic [11:0] out_pix
);
  always_ff @(posedge clk) begin
    out_valid <= in_valid;
    out_pix   <= {in_pix[15:12], in_pix[10:7], in_pix[4:1]};
  end
endmodule
