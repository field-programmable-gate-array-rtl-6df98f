// frame_ram: on-chip image memory (SRAM) for one frame.
//
// A simple dual-port RAM of DEPTH words of DW bits: one write port and one
// read port, both synchronous to `clk`. The read is registered: `rdata` holds
// the word at `raddr` one clock after the address is presented. Written as an
// array so that FPGA tools map it to block RAM. The default size is one
// 512 x 512 frame of 8-bit pixels. The system keeps source and result images
// in SRAM; the port arrangement and read latency are this design's choices.
module frame_ram #(
  parameter int unsigned DEPTH = 512 * 512,
  parameter int unsigned DW    = 8
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [DW-1:0]            wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [DW-1:0]            rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
