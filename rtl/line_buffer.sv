// line_buffer: 3-line cache that aligns three image lines for a 3x3 window.
//
// Pixels arrive in raster order (left to right, top to bottom). Three
// line_fifo instances of IMG_W entries are cascaded: the input goes into
// FIFO1; once FIFO1 holds a whole line, every further push also moves its
// oldest pixel into FIFO2, and likewise FIFO2 feeds FIFO3. From the fourth
// line on, all three FIFOs are full and, for input pixel n, present pixels
// n-W (FIFO1), n-2W (FIFO2) and n-3W (FIFO3): the same column of the three
// previous lines. `line1` is the oldest (top) line and comes from FIFO3,
// `line3` the newest (bottom) line and comes from FIFO1.
//
// Timing: outputs are combinational and belong to the current push;
// `lines_valid` is high while all three FIFOs are full. The cascade of three
// FIFOs and the alignment from the fourth line follow the design description;
// the `clear` input that restarts a frame is this design's addition.
module line_buffer
  import edge_pkg::*;
#(
  parameter int unsigned IMG_W = 512
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   in_valid,
  input  pixel_t in_pix,
  output pixel_t line1,
  output pixel_t line2,
  output pixel_t line3,
  output logic   lines_valid
);
  pixel_t q1, q2, q3;
  logic   full1, full2, full3;

  line_fifo #(.DEPTH(IMG_W), .DW(PIX_W)) u_fifo1 (
    .clk, .rst_n, .clear, .push(in_valid), .din(in_pix), .dout(q1), .full(full1)
  );
  line_fifo #(.DEPTH(IMG_W), .DW(PIX_W)) u_fifo2 (
    .clk, .rst_n, .clear, .push(in_valid && full1), .din(q1), .dout(q2), .full(full2)
  );
  line_fifo #(.DEPTH(IMG_W), .DW(PIX_W)) u_fifo3 (
    .clk, .rst_n, .clear, .push(in_valid && full2), .din(q2), .dout(q3), .full(full3)
  );

  assign line1       = q3;
  assign line2       = q2;
  assign line3       = q1;
  assign lines_valid = full3;
endmodule
