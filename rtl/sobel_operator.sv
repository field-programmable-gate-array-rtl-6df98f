// sobel_operator: Sobel gradients of a 3x3 window and their combination.
//
// Convolves the window with the two Sobel masks
//     Gx = [+1 0 -1; +2 0 -2; +1 0 -1]   Gy = [+1 +2 +1; 0 0 0; -1 -2 -1]
// (window [row][col], row 0 top, col 0 left) and adds the two results,
// B = |Gx| + |Gy|. The masks are the ones the design is based on; taking
// magnitudes before the sum, so that edges of opposite sign in the two
// directions do not cancel, is this design's reading of "add the results".
// Gx and Gy span -1020..+1020; B spans 0..2040.
//
// Timing: one register stage. `out_valid`, `gx`, `gy` and `mag` appear one
// clock after `in_valid` and `win`.
module sobel_operator
  import edge_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  window_t win,
  output logic    out_valid,
  output grad_t   gx,
  output grad_t   gy,
  output mag_t    mag
);
  function automatic grad_t px(pixel_t p);
    return grad_t'({3'b000, p});
  endfunction

  function automatic mag_t absval(grad_t g);
    return (g < 0) ? mag_t'(-g) : mag_t'(g);
  endfunction

  grad_t gx_c, gy_c;

  always_comb begin
    gx_c = (px(win[0][0]) + (px(win[1][0]) <<< 1) + px(win[2][0]))
         - (px(win[0][2]) + (px(win[1][2]) <<< 1) + px(win[2][2]));
    gy_c = (px(win[0][0]) + (px(win[0][1]) <<< 1) + px(win[0][2]))
         - (px(win[2][0]) + (px(win[2][1]) <<< 1) + px(win[2][2]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      gx        <= '0;
      gy        <= '0;
      mag       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        gx  <= gx_c;
        gy  <= gy_c;
        mag <= absval(gx_c) + absval(gy_c);
      end
    end
  end
endmodule
