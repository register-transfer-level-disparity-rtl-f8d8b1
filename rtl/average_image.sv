// average_image: debug view of the stereo pair. Stores, for every pixel,
// the mean of the left and right pixels, floor((L + R) / 2), in a frame
// buffer of IMG_W * IMG_H x PIX_W bits that can be read out for display.
//
// Input is a raster-order stream of pixel pairs (`in_valid`, `in_l`,
// `in_r`); `in_sof` marks the first pixel of a frame and restarts the write
// address at 0. Each pair is written one clock after it arrives, at the
// next address. `frame_done` pulses when the last pixel of a frame has been
// written. Reading: `rdata` follows `raddr` by one `rclk` edge.
// The averaged image and its size follow the design; the floor rounding
// and the stream interface are this implementation's choice.
module average_image #(
  parameter int unsigned IMG_W = 320,
  parameter int unsigned IMG_H = 240,
  parameter int unsigned PIX_W = 4,
  localparam int unsigned NPIX = IMG_W * IMG_H,
  localparam int unsigned AW   = $clog2(NPIX)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_sof,
  input  logic [PIX_W-1:0] in_l,
  input  logic [PIX_W-1:0] in_r,
  output logic             frame_done,
  input  logic             rclk,
  input  logic [AW-1:0]    raddr,
  output logic [PIX_W-1:0] rdata
);
  logic [AW-1:0]    addr;     // address of the next pixel
  logic             we;
  logic [AW-1:0]    waddr;
  logic [PIX_W-1:0] wdata;
  logic [PIX_W:0]   sum;

  assign sum = {1'b0, in_l} + {1'b0, in_r};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr       <= '0;
      we         <= 1'b0;
      waddr      <= '0;
      wdata      <= '0;
      frame_done <= 1'b0;
    end else begin
      we         <= in_valid;
      wdata      <= sum[PIX_W:1];
      frame_done <= 1'b0;
      if (in_valid) begin
        waddr <= in_sof ? '0 : addr;
        if (in_sof ? (NPIX == 1) : (32'(addr) == NPIX - 1)) begin
          addr       <= '0;
          frame_done <= 1'b1;
        end else begin
          addr <= in_sof ? AW'(1) : addr + 1'b1;
        end
      end
    end
  end

  dual_clock_ram #(.WIDTH(PIX_W), .DEPTH(NPIX)) u_mem (
    .wclk(clk), .we(we), .waddr(waddr), .wdata(wdata),
    .rclk(rclk), .raddr(raddr), .rdata(rdata)
  );
endmodule
