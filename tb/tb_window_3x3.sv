// tb_window_3x3: shifts random columns into the window, with idle cycles in
// between, and checks every window entry against a model of the last three
// columns.
module tb_window_3x3;
  import edge_pkg::*;
  logic clk = 0, rst_n = 0, shift = 0;
  pixel_t line1 = 0, line2 = 0, line3 = 0;
  window_t win;
  int checks = 0, failures = 0;
  int cols[$][3];

  window_3x3 dut (.*);

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
    for (int i = 0; i < 200; i++) begin
      int col[3];
      shift = ($urandom % 3 != 0);
      foreach (col[k]) col[k] = int'($urandom % 256);
      line1 = pixel_t'(col[0]); line2 = pixel_t'(col[1]); line3 = pixel_t'(col[2]);
      @(posedge clk); #1;
      if (shift) cols.push_back(col);
      if (cols.size() >= 3) begin
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) begin
            checks++;
            if (win[r][c] !== pixel_t'(cols[cols.size()-3+c][r])) begin
              failures++;
              $display("i=%0d win[%0d][%0d]=%0d exp %0d", i, r, c, win[r][c],
                       cols[cols.size()-3+c][r]);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
