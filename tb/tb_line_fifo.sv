// tb_line_fifo: checks that line_fifo returns each pixel exactly DEPTH pushes
// after it went in, raises `full` after DEPTH pushes, tolerates idle cycles and
// restarts on `clear`.
module tb_line_fifo;
  localparam int DEPTH = 5;
  logic clk = 0, rst_n = 0, clear = 0, push = 0;
  logic [7:0] din = 0, dout;
  logic full;
  int checks = 0, failures = 0;
  int hist[$];

  line_fifo #(.DEPTH(DEPTH), .DW(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_push(input logic [7:0] v);
    push = 1; din = v;
    #1;
    checks++;
    if (full !== (hist.size() >= DEPTH)) begin
      failures++; $display("full=%0d after %0d pushes", full, hist.size());
    end
    if (hist.size() >= DEPTH) begin
      checks++;
      if (dout !== 8'(hist[hist.size()-DEPTH])) begin
        failures++; $display("dout=%0d exp=%0d", dout, hist[hist.size()-DEPTH]);
      end
    end
    @(posedge clk); #1;
    hist.push_back(v);
    push = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int frame = 0; frame < 2; frame++) begin
      hist.delete();
      for (int i = 0; i < 60; i++) begin
        do_push(8'($urandom));
        if ($urandom % 3 == 0) begin @(posedge clk); #1; end
      end
      clear = 1; @(posedge clk); #1; clear = 0;
      checks++;
      if (full) begin failures++; $display("full after clear"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
