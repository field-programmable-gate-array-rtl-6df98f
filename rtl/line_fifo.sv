// line_fifo: one image-line FIFO of the 3-line cache.
//
// A circular buffer of DEPTH pixels (one image line). Every push writes `din`
// into the slot at the pointer and advances the pointer; the slot about to be
// overwritten holds the oldest entry, which is presented on `dout`
// combinationally. Once DEPTH pixels have been pushed, `full` is high and
// `dout` is the pixel pushed exactly DEPTH pushes earlier, so reading and
// writing happen on the same push, as in the line cache where a line is read
// out of one FIFO while the next line is written into it.
//
// Timing: `dout` is valid in the same cycle as the push that pops it.
// `clear` restarts the fill count and the pointer for a new frame; the
// storage itself is not cleared, since nothing is read from it before `full`.
// The FIFO depth of one line follows the line cache described for the design;
// the pointer/fill-count structure is this design's choice.
module line_fifo #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned DW    = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          push,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout,
  output logic          full
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] ptr;
  logic [AW:0]   fill;

  assign dout = mem[ptr];
  assign full = (fill == (AW+1)'(DEPTH));

  always_ff @(posedge clk) begin
    if (push) mem[ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr  <= '0;
      fill <= '0;
    end else if (clear) begin
      ptr  <= '0;
      fill <= '0;
    end else if (push) begin
      ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
      if (!full) fill <= fill + 1'b1;
    end
  end
endmodule
