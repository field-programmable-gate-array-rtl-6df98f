// tb_line_buffer: streams a frame through the 3-line cache and checks that,
// from the fourth line on, line3/line2/line1 are the same column of the
// previous, second-previous and third-previous lines, and that lines_valid
// rises exactly at the first pixel of the fourth line.
module tb_line_buffer;
  import edge_pkg::*;
  localparam int W = 6;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  pixel_t in_pix = 0, line1, line2, line3;
  logic lines_valid;
  int checks = 0, failures = 0;
  int pix[$];

  line_buffer #(.IMG_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int frame = 0; frame < 2; frame++) begin
      pix.delete();
      for (int n = 0; n < 8 * W; n++) begin
        pixel_t v;
        v = pixel_t'($urandom);
        in_valid = 1; in_pix = v;
        #1;
        checks++;
        if (lines_valid !== (n >= 3 * W)) begin
          failures++; $display("n=%0d lines_valid=%0d", n, lines_valid);
        end
        if (n >= 3 * W) begin
          checks++;
          if (line3 !== pixel_t'(pix[n-W]) || line2 !== pixel_t'(pix[n-2*W]) ||
              line1 !== pixel_t'(pix[n-3*W])) begin
            failures++;
            $display("n=%0d lines %0d %0d %0d exp %0d %0d %0d", n, line1, line2, line3,
                     pix[n-3*W], pix[n-2*W], pix[n-W]);
          end
        end
        @(posedge clk); #1;
        pix.push_back(v);
        in_valid = 0;
        if ($urandom % 4 == 0) begin @(posedge clk); #1; end
      end
      clear = 1; @(posedge clk); #1; clear = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
