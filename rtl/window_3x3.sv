// window_3x3: 3x3 pixel window built from three aligned image lines.
//
// Each row of the window is a three-stage shift register. On every
// `shift`, each row moves one column to the left and the new column
// (`line1` top, `line2` middle, `line3` bottom) enters at column 2, so after
// three shifts along a line the window holds three consecutive columns of
// three consecutive lines. Index [row][col]: [0][0] is top-left.
//
// Timing: the window is registered; it reflects the columns shifted in up
// to and including the previous clock edge. The window itself is what the
// design description asks for; the shift-register form is this design's choice.
module window_3x3
  import edge_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    shift,
  input  pixel_t  line1,
  input  pixel_t  line2,
  input  pixel_t  line3,
  output window_t win
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win <= '0;
    end else if (shift) begin
      for (int r = 0; r < 3; r++) begin
        win[r][0] <= win[r][1];
        win[r][1] <= win[r][2];
      end
      win[0][2] <= line1;
      win[1][2] <= line2;
      win[2][2] <= line3;
    end
  end
endmodule
