// tb_edge_pipeline: streams two small frames (plus the 2*W+1 flush pixels)
// through the pipeline, the first with random idle cycles, the second back to
// back, and checks every output pixel, its raster address, out_last, the
// output count and, for the back-to-back frame, the 2-clock latency from the
// last push to the last output.
module tb_edge_pipeline;
  import edge_pkg::*;
  import sobel_ref_pkg::*;
  localparam int W = 9, H = 7, TH = 128;
  localparam int AW = $clog2(W*H);
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  pixel_t in_pix = 0, out_pix;
  logic out_valid, out_last;
  logic [AW-1:0] out_addr;
  int checks = 0, failures = 0;
  int img[];
  int n_out, n_edge, n_border, last_push_cyc, last_out_cyc, cyc;

  edge_pipeline #(.IMG_W(W), .IMG_H(H), .THRESH(TH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) begin
    #2;
    if (rst_n && out_valid) begin
      int r, c, exp;
      r = n_out / W; c = n_out % W;
      exp = ref_edge(img, W, H, r, c, TH);
      checks++;
      if (int'(out_addr) != n_out || int'(out_pix) != exp ||
          out_last != (n_out == W*H-1)) begin
        failures++;
        $display("out %0d addr=%0d pix=%0d last=%0d exp pix %0d", n_out, out_addr,
                 out_pix, out_last, exp);
      end
      if (exp == 255) n_edge++;
      if (r == 0 || r == H-1 || c == 0 || c == W-1) n_border++;
      n_out++;
      last_out_cyc = cyc;
    end
  end

  task automatic run_frame(input int seed, input bit gaps);
    make_image(img, W, H, seed);
    n_out = 0; n_edge = 0; n_border = 0;
    clear = 1; @(posedge clk); #1; clear = 0;
    for (int n = 0; n < frame_feed_len(W, H); n++) begin
      in_valid = 1;
      in_pix = (n < W*H) ? pixel_t'(img[n]) : pixel_t'($urandom);
      @(posedge clk); #1;
      last_push_cyc = cyc;
      in_valid = 0;
      if (gaps && $urandom % 3 == 0) begin @(posedge clk); #1; end
    end
    repeat (8) @(posedge clk);
    #3;
    checks++;
    if (n_out != W*H) begin failures++; $display("outputs %0d exp %0d", n_out, W*H); end
    checks++;
    if (n_edge == 0 || n_edge == W*H - n_border) begin
      failures++; $display("test image did not exercise both edge classes");
    end
    if (!gaps) begin
      checks++;
      if (last_out_cyc - last_push_cyc != 2) begin
        failures++; $display("latency %0d exp 2", last_out_cyc - last_push_cyc);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    run_frame(1, 1);
    run_frame(2, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
