// edge_threshold: turns the Sobel magnitude into a binary edge pixel.
//
// A pixel whose magnitude B is at least THRESH becomes an edge (255),
// any other pixel background (0); a pixel flagged `border` (image frame, where
// the 3x3 window is incomplete) is always background. The binary 0/255 output
// matches the two-valued edge image of the design; the threshold value and
// the border rule are this design's choices.
//
// Timing: one register stage; `out_valid` and `out_pix` follow `in_valid`
// by one clock.
module edge_threshold
  import edge_pkg::*;
#(
  parameter int unsigned THRESH = 128
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  mag_t   mag,
  input  logic   border,
  output logic   out_valid,
  output pixel_t out_pix
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= PIX_BG;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        out_pix <= (!border && (32'(mag) >= THRESH)) ? PIX_EDGE : PIX_BG;
    end
  end
endmodule
