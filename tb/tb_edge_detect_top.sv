// tb_edge_detect_top: end-to-end test of the system on 16 x 12 frames. For
// each of two frames it loads a synthetic image, starts the detector, checks
// the start-to-done time (feed length + 4 clocks), that a second start while
// busy is ignored, and reads back and checks every result pixel against a
// reference model. It counts border pixels, edge and background pixels,
// flush pixels and ignored starts, and fails if any never occurred.
module tb_edge_detect_top;
  import edge_pkg::*;
  import sobel_ref_pkg::*;
  localparam int W = 16, H = 12;
  localparam int N = W*H;
  localparam int AW = $clog2(N);
  localparam int TH = 128;
  logic clk = 0, rst_n = 0, load_we = 0, start = 0, busy, done;
  logic [AW-1:0] load_addr = 0, res_addr = 0;
  pixel_t load_pix = 0, res_pix;
  int checks = 0, failures = 0;
  int img[];
  longint cyc;
  int n_border, n_edge, n_bg, n_flush, n_frames, n_busy_start;

  edge_detect_top #(.IMG_W(W), .IMG_H(H), .THRESH(128)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (dut.u_ctrl.pipe_valid && dut.u_ctrl.iss_flush) n_flush++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(input int seed);
    longint t0;
    make_image(img, W, H, seed);
    for (int a = 0; a < N; a++) begin
      load_we = 1; load_addr = AW'(a); load_pix = pixel_t'(img[a]);
      @(posedge clk); #1;
    end
    load_we = 0;
    start = 1; @(posedge clk); #1; start = 0;
    t0 = cyc;
    repeat (5) @(posedge clk); #1;
    // start while busy is ignored
    if (busy) begin
      n_busy_start++;
      start = 1; @(posedge clk); #1; start = 0;
    end
    while (!done) begin @(posedge clk); #1; end
    checks++;
    if (cyc - t0 != longint'(frame_feed_len(W, H)) + 4) begin
      failures++; $display("frame took %0d clocks, exp %0d", cyc - t0, frame_feed_len(W, H) + 4);
    end
    @(posedge clk); #1;
    checks++;
    if (busy) begin failures++; $display("busy after done (second start accepted?)"); end
    n_frames++;
    for (int a = 0; a < N; a++) begin
      int r, c, exp;
      res_addr = AW'(a);
      @(posedge clk); #1;
      r = a / W; c = a % W;
      exp = ref_edge(img, W, H, r, c, TH);
      checks++;
      if (int'(res_pix) != exp) begin
        failures++;
        if (failures < 10) $display("pixel (%0d,%0d) = %0d exp %0d", r, c, res_pix, exp);
      end
      if (r == 0 || r == H-1 || c == 0 || c == W-1) n_border++;
      else if (exp == 255) n_edge++;
      else n_bg++;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int f = 0; f < 2; f++) run_frame(f + 3);
    $display("frames=%0d border=%0d edge=%0d background=%0d flush=%0d start_while_busy=%0d",
             n_frames, n_border, n_edge, n_bg, n_flush, n_busy_start);
    checks++;
    if (n_border == 0 || n_edge == 0 || n_bg == 0 || n_flush == 0 || n_busy_start == 0 || n_frames != 2) begin
      failures++; $display("a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
