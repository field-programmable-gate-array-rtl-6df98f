// tb_frame_ram: writes random words, reads them back with the one-clock read
// latency, and checks a read of an address written in the same cycle returns
// the old word.
module tb_frame_ram;
  localparam int DEPTH = 64;
  logic clk = 0, we = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [7:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  int model[DEPTH];

  frame_ram #(.DEPTH(DEPTH), .DW(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    for (int a = 0; a < DEPTH; a++) begin
      we = 1; waddr = 6'(a); wdata = 8'($urandom); model[a] = int'(wdata);
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < 500; i++) begin
      int a, old;
      a = int'($urandom % DEPTH);
      raddr = 6'(a);
      old = model[a];
      we = ($urandom % 2 == 0); waddr = 6'($urandom % DEPTH); wdata = 8'($urandom);
      if (we) model[waddr] = int'(wdata);
      @(posedge clk); #1;
      we = 0;
      checks++;
      if (int'(rdata) != old) begin
        failures++; $display("addr %0d read %0d exp %0d", a, rdata, old);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
