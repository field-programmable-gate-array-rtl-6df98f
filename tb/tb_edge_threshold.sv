// tb_edge_threshold: checks the 0/255 decision around the threshold, the
// border override and the one-clock latency.
module tb_edge_threshold;
  import edge_pkg::*;
  localparam int TH = 128;
  logic clk = 0, rst_n = 0, in_valid = 0, border = 0;
  mag_t mag = 0;
  logic out_valid;
  pixel_t out_pix;
  int checks = 0, failures = 0;

  edge_threshold #(.THRESH(TH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int m, input logic b);
    int exp;
    exp = (!b && m >= TH) ? 255 : 0;
    mag = mag_t'(m); border = b; in_valid = 1;
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (!out_valid || int'(out_pix) != exp) begin
      failures++; $display("mag=%0d border=%0d out=%0d exp=%0d", m, b, out_pix, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    apply(0, 0); apply(TH-1, 0); apply(TH, 0); apply(TH+1, 0); apply(2040, 0);
    apply(TH, 1); apply(2040, 1);
    for (int i = 0; i < 300; i++) apply(int'($urandom % 2041), logic'($urandom % 4 == 0));
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("out_valid without input"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
