// edge_detect_top: Sobel edge detection system for 512 x 512 grey images.
//
// A host loads an 8-bit grey image into the source SRAM through the `load_*`
// port, pulses `start`, waits for `done` and reads the binary edge image
// (0 = background, 255 = edge) from the result SRAM through the `res_*` port.
// Inside, frame_controller streams the source image in raster order into
// edge_pipeline (3-line FIFO cache, 3x3 window, Sobel |Gx|+|Gy|, threshold),
// whose outputs are written to the result SRAM at their raster address.
//
// Timing: the load port writes one pixel per clock; `res_pix` follows
// `res_addr` by one clock. A frame takes IMG_W*IMG_H + 2*IMG_W + 1 clocks of
// streaming plus latency: `done` pulses IMG_W*IMG_H + 2*IMG_W + 5 clocks
// after the clock edge that accepts `start`. The host may read
// results of a finished frame at any time; loading while a frame runs
// corrupts that frame. The source/result SRAMs and the Sobel datapath follow
// the design description; the host ports are this design's choice.
module edge_detect_top
  import edge_pkg::*;
#(
  parameter int unsigned IMG_W  = 512,
  parameter int unsigned IMG_H  = 512,
  parameter int unsigned THRESH = 128
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // source image load port
  input  logic                           load_we,
  input  logic [$clog2(IMG_W*IMG_H)-1:0] load_addr,
  input  pixel_t                         load_pix,
  // control
  input  logic                           start,
  output logic                           busy,
  output logic                           done,
  // result image read port
  input  logic [$clog2(IMG_W*IMG_H)-1:0] res_addr,
  output pixel_t                         res_pix
);
  localparam int unsigned N_PIX = IMG_W * IMG_H;
  localparam int unsigned AW    = $clog2(N_PIX);

  logic [AW-1:0] src_raddr;
  pixel_t        src_rdata;
  logic          pipe_clear, pipe_valid, pipe_last;
  pixel_t        pipe_pix;
  logic          out_valid;
  pixel_t        out_pix;
  logic [AW-1:0] out_addr;

  frame_ram #(.DEPTH(N_PIX), .DW(PIX_W)) u_src_ram (
    .clk, .we(load_we), .waddr(load_addr), .wdata(load_pix),
    .raddr(src_raddr), .rdata(src_rdata)
  );

  frame_controller #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .ram_raddr(src_raddr), .ram_rdata(src_rdata),
    .pipe_clear, .pipe_valid, .pipe_pix, .pipe_last
  );

  edge_pipeline #(.IMG_W(IMG_W), .IMG_H(IMG_H), .THRESH(THRESH)) u_pipe (
    .clk, .rst_n, .clear(pipe_clear), .in_valid(pipe_valid), .in_pix(pipe_pix),
    .out_valid, .out_pix, .out_addr, .out_last(pipe_last)
  );

  frame_ram #(.DEPTH(N_PIX), .DW(PIX_W)) u_res_ram (
    .clk, .we(out_valid), .waddr(out_addr), .wdata(out_pix),
    .raddr(res_addr), .rdata(res_pix)
  );
endmodule
