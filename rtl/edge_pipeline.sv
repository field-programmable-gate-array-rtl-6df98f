// edge_pipeline: streaming 3x3 Sobel edge detector for one raster-order frame.
//
// Pixels enter one per `in_valid` in raster order. The line_buffer aligns the
// three previous lines, window_3x3 forms the 3x3 window, sobel_operator
// computes B = |Gx| + |Gy| and edge_threshold turns B into a 0/255 pixel.
//
// Addressing: input pixel n completes the window centred on output pixel
// n - (2*IMG_W + 1). To produce all IMG_W*IMG_H output pixels the feeder must
// therefore push IMG_W*IMG_H + 2*IMG_W + 1 pixels; the ones after the frame are
// flush pixels whose value does not matter. Outputs come out exactly once
// each, in raster order, with `out_addr` = row*IMG_W + col; `out_last` marks
// the final pixel. Pixels on the image frame (first/last row and column) have
// an incomplete window and are output as background (0).
//
// Timing: three register stages (window, Sobel, threshold). The first of them
// captures the window at the clock edge that accepts the push, so the output
// is on `out_valid` two clocks after that edge. `in_valid` may
// have gaps; there is no back-pressure. `clear` starts a new frame.
// The line cache, masks and binary output follow the design description; the
// flush, the border rule and the addressing are this design's choices.
module edge_pipeline
  import edge_pkg::*;
#(
  parameter int unsigned IMG_W  = 512,
  parameter int unsigned IMG_H  = 512,
  parameter int unsigned THRESH = 128
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              clear,
  input  logic                              in_valid,
  input  pixel_t                            in_pix,
  output logic                              out_valid,
  output pixel_t                            out_pix,
  output logic [$clog2(IMG_W*IMG_H)-1:0]    out_addr,
  output logic                              out_last
);
  localparam int unsigned AW = $clog2(IMG_W * IMG_H);
  localparam int unsigned RW = $clog2(IMG_H + 4) + 1;
  localparam int unsigned CW = $clog2(IMG_W) + 1;

  // Position of the incoming pixel (rows beyond IMG_H-1 are flush rows).
  logic [RW-1:0] in_r;
  logic [CW-1:0] in_c;

  // Window centre completed by the current push.
  logic [RW-1:0] cen_r;
  logic [CW-1:0] cen_c;
  logic          cen_ok, cen_border;

  always_comb begin
    if (in_c != '0) begin
      cen_r  = in_r - RW'(2);
      cen_c  = in_c - CW'(1);
      cen_ok = (in_r >= RW'(2)) && (in_r < RW'(IMG_H + 2));
    end else begin
      cen_r  = in_r - RW'(3);
      cen_c  = CW'(IMG_W - 1);
      cen_ok = (in_r >= RW'(3)) && (in_r < RW'(IMG_H + 3));
    end
    cen_border = (cen_r == '0) || (cen_r == RW'(IMG_H - 1)) ||
                 (cen_c == '0) || (cen_c == CW'(IMG_W - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_r <= '0;
      in_c <= '0;
    end else if (clear) begin
      in_r <= '0;
      in_c <= '0;
    end else if (in_valid) begin
      if (in_c == CW'(IMG_W - 1)) begin
        in_c <= '0;
        if (in_r != RW'(IMG_H + 3)) in_r <= in_r + 1'b1;
      end else begin
        in_c <= in_c + 1'b1;
      end
    end
  end

  // Line cache and window (stage 1).
  pixel_t  line1, line2, line3;
  logic    lines_valid;
  window_t win;

  line_buffer #(.IMG_W(IMG_W)) u_lines (
    .clk, .rst_n, .clear, .in_valid, .in_pix,
    .line1, .line2, .line3, .lines_valid
  );

  window_3x3 u_win (
    .clk, .rst_n, .shift(in_valid), .line1, .line2, .line3, .win
  );

  logic s1_valid, s1_border;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_border <= 1'b0;
    end else begin
      s1_valid  <= in_valid && cen_ok && !clear;
      s1_border <= cen_border;
    end
  end

  // Sobel (stage 2).
  logic  s2_valid, s2_border;
  grad_t gx, gy;
  mag_t  mag;

  sobel_operator u_sobel (
    .clk, .rst_n, .in_valid(s1_valid), .win,
    .out_valid(s2_valid), .gx, .gy, .mag
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s2_border <= 1'b0;
    else        s2_border <= s1_border;
  end

  // Threshold (stage 3).
  edge_threshold #(.THRESH(THRESH)) u_thr (
    .clk, .rst_n, .in_valid(s2_valid), .mag, .border(s2_border),
    .out_valid, .out_pix
  );

  // Output address: outputs arrive in raster order, so a counter suffices.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         out_addr <= '0;
    else if (clear)     out_addr <= '0;
    else if (out_valid) out_addr <= out_addr + 1'b1;
  end

  assign out_last = out_valid && (out_addr == AW'(IMG_W * IMG_H - 1));

  // An interior window may only be formed once all three lines are aligned.
  a_interior_aligned: assert property (
    @(posedge clk) disable iff (!rst_n)
    (in_valid && cen_ok && !cen_border) |-> lines_valid
  );
endmodule
