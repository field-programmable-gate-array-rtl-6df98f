// frame_controller: runs one edge-detection pass over the source frame.
//
// On `start` (accepted while idle) it pulses `pipe_clear`, then reads the
// source SRAM in raster order, one address per clock, and forwards each word
// to the pipeline with `pipe_valid` one clock later (the SRAM read latency).
// After the IMG_W*IMG_H image pixels it pushes 2*IMG_W + 1 flush pixels of
// value 0 so that the pipeline's last windows complete. It then waits for the
// pipeline's `pipe_last` and pulses `done`. `busy` is high from the clock
// after `start` until `done`.
//
// Timing: a frame takes IMG_W*IMG_H + 2*IMG_W + 1 feed clocks plus the SRAM
// and pipeline latency (about 5.3 ms for 512 x 512 at 50 MHz). Reading the
// image from SRAM line by line follows the design description; the state
// machine, the flush and the handshake are this design's choices.
module frame_controller
  import edge_pkg::*;
#(
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  output logic                           busy,
  output logic                           done,
  output logic [$clog2(IMG_W*IMG_H)-1:0] ram_raddr,
  input  pixel_t                         ram_rdata,
  output logic                           pipe_clear,
  output logic                           pipe_valid,
  output pixel_t                         pipe_pix,
  input  logic                           pipe_last
);
  localparam int unsigned N_PIX  = IMG_W * IMG_H;
  localparam int unsigned N_FEED = frame_feed_len(IMG_W, IMG_H);
  localparam int unsigned AW     = $clog2(N_PIX);
  localparam int unsigned NW     = $clog2(N_FEED + 1);

  typedef enum logic [1:0] {S_IDLE, S_FEED, S_DRAIN} state_t;

  state_t        state;
  logic [NW-1:0] cnt;
  logic          iss_valid, iss_flush;

  assign busy      = (state != S_IDLE);
  assign ram_raddr = (cnt < NW'(N_PIX)) ? cnt[AW-1:0] : '0;
  assign pipe_pix  = iss_flush ? PIX_BG : ram_rdata;
  assign pipe_valid = iss_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cnt        <= '0;
      iss_valid  <= 1'b0;
      iss_flush  <= 1'b0;
      pipe_clear <= 1'b0;
      done       <= 1'b0;
    end else begin
      pipe_clear <= 1'b0;
      done       <= 1'b0;
      iss_valid  <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state      <= S_FEED;
            cnt        <= '0;
            pipe_clear <= 1'b1;
          end
        end
        S_FEED: begin
          iss_valid <= 1'b1;
          iss_flush <= (cnt >= NW'(N_PIX));
          cnt       <= cnt + 1'b1;
          if (cnt == NW'(N_FEED - 1)) state <= S_DRAIN;
        end
        S_DRAIN: begin
          if (pipe_last) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
