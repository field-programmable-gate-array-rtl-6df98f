// tb_frame_controller: drives the controller with a model of the source SRAM
// (one-clock read latency) and of the pipeline's end-of-frame signal. Checks
// the clear pulse, that the image is fed in raster order back to back
// followed by exactly 2*W+1 zero flush pixels, busy, the done pulse after
// pipe_last, that start is ignored while busy, and a second frame.
module tb_frame_controller;
  import edge_pkg::*;
  localparam int W = 5, H = 4, N = W*H;
  localparam int AW = $clog2(N);
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [AW-1:0] ram_raddr;
  pixel_t ram_rdata, pipe_pix;
  logic pipe_clear, pipe_valid, pipe_last = 0;
  int checks = 0, failures = 0;
  pixel_t mem[N];
  int n_feed, n_clear, n_done, cyc, first_feed_cyc, last_feed_cyc, clear_cyc;
  bit contiguous;

  frame_controller #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) ram_rdata <= mem[ram_raddr];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (pipe_clear) begin n_clear++; clear_cyc = cyc; end
      if (done) n_done++;
      if (pipe_valid) begin
        int exp;
        exp = (n_feed < N) ? int'(mem[n_feed]) : 0;
        checks++;
        if (int'(pipe_pix) != exp) begin
          failures++; $display("feed %0d pix %0d exp %0d", n_feed, pipe_pix, exp);
        end
        if (n_feed == 0) first_feed_cyc = cyc;
        else if (cyc != last_feed_cyc + 1) contiguous = 0;
        last_feed_cyc = cyc;
        n_feed++;
      end
    end
  end

  task automatic run_frame();
    foreach (mem[i]) mem[i] = pixel_t'($urandom % 255 + 1);
    n_feed = 0; n_clear = 0; n_done = 0; contiguous = 1;
    start = 1; @(posedge clk); #1; start = 0;
    checks++;
    if (!busy) begin failures++; $display("busy not set"); end
    wait (n_feed == frame_feed_len(W, H));
    repeat (3) @(posedge clk);
    // a start while busy must be ignored
    start = 1; @(posedge clk); #1; start = 0;
    checks++;
    if (n_done != 0 || !busy) begin failures++; $display("finished before pipe_last"); end
    pipe_last = 1; @(posedge clk); #1; pipe_last = 0;
    @(posedge clk); #1;
    checks++;
    if (n_done != 1 || busy) begin failures++; $display("done=%0d busy=%0d", n_done, busy); end
    checks++;
    if (n_feed != frame_feed_len(W, H) || !contiguous) begin
      failures++; $display("fed %0d contiguous=%0d", n_feed, contiguous);
    end
    checks++;
    if (n_clear != 1 || clear_cyc >= first_feed_cyc) begin
      failures++; $display("clear count %0d at %0d, first feed %0d", n_clear, clear_cyc, first_feed_cyc);
    end
    repeat (3) @(posedge clk);
    checks++;
    if (busy || n_feed != frame_feed_len(W, H)) begin failures++; $display("restarted while idle"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    run_frame();
    run_frame();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
