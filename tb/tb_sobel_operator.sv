// tb_sobel_operator: applies directed windows (flat, vertical edge,
// horizontal edge, extremes) and random ones, and checks Gx, Gy and
// |Gx|+|Gy| against integer arithmetic one clock later.
module tb_sobel_operator;
  import edge_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  window_t win = '0;
  logic out_valid;
  grad_t gx, gy;
  mag_t mag;
  int checks = 0, failures = 0;

  sobel_operator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int p(window_t w, int r, int c);
    return int'(w[r][c]);
  endfunction

  task automatic apply(input window_t w);
    int ex, ey;
    ex = (p(w,0,0) + 2*p(w,1,0) + p(w,2,0)) - (p(w,0,2) + 2*p(w,1,2) + p(w,2,2));
    ey = (p(w,0,0) + 2*p(w,0,1) + p(w,0,2)) - (p(w,2,0) + 2*p(w,2,1) + p(w,2,2));
    win = w; in_valid = 1;
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (!out_valid || int'(gx) != ex || int'(gy) != ey ||
        int'(mag) != ((ex < 0 ? -ex : ex) + (ey < 0 ? -ey : ey))) begin
      failures++;
      $display("gx=%0d gy=%0d mag=%0d exp %0d %0d", gx, gy, mag, ex, ey);
    end
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("out_valid stuck"); end
  endtask

  initial begin
    window_t w;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    apply('0);
    apply({9{8'd200}});
    // vertical edge: bright left column
    w = '0; for (int r = 0; r < 3; r++) w[r][0] = 8'd255; apply(w);
    // bright right column
    w = '0; for (int r = 0; r < 3; r++) w[r][2] = 8'd255; apply(w);
    // horizontal edge: bright bottom row
    w = '0; for (int c = 0; c < 3; c++) w[2][c] = 8'd255; apply(w);
    // extreme corner
    w = {9{8'd255}}; w[2][2] = 0; w[1][2] = 0; w[2][1] = 0; apply(w);
    for (int i = 0; i < 300; i++) begin
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) w[r][c] = pixel_t'($urandom);
      apply(w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
