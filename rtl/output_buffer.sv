// output_buffer: accumulates the depth (disparity) image. The disparity
// generator delivers one 8-bit grey level per pixel in raster order; this
// block writes them one after the other into a frame buffer of
// IMG_W * IMG_H bytes (76,800 bytes at 320 x 240), from which a display or
// host reads the finished image.
//
// `in_sof` marks the first pixel of a frame and restarts the write address
// at 0; each pixel is written one clock after it arrives. `frame_done`
// pulses when the last pixel of the frame has been written, and
// `frames` counts completed frames. Reading: `rdata` follows `raddr` by one
// `rclk` edge; the read clock is independent of the write clock.
// Buffer size and grey-level depth follow the design; the stream interface
// and the frame counter are this implementation's choice.
module output_buffer #(
  parameter int unsigned IMG_W  = 320,
  parameter int unsigned IMG_H  = 240,
  parameter int unsigned DISP_W = 8,
  localparam int unsigned NPIX  = IMG_W * IMG_H,
  localparam int unsigned AW    = $clog2(NPIX)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_sof,
  input  logic [DISP_W-1:0] in_pix,
  output logic              frame_done,
  output logic [15:0]       frames,
  input  logic              rclk,
  input  logic [AW-1:0]     raddr,
  output logic [DISP_W-1:0] rdata
);
  logic [AW-1:0]     addr;
  logic              we;
  logic [AW-1:0]     waddr;
  logic [DISP_W-1:0] wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr       <= '0;
      we         <= 1'b0;
      waddr      <= '0;
      wdata      <= '0;
      frame_done <= 1'b0;
      frames     <= '0;
    end else begin
      we         <= in_valid;
      wdata      <= in_pix;
      frame_done <= 1'b0;
      if (in_valid) begin
        waddr <= in_sof ? '0 : addr;
        if (in_sof ? (NPIX == 1) : (32'(addr) == NPIX - 1)) begin
          addr       <= '0;
          frame_done <= 1'b1;
          frames     <= frames + 1'b1;
        end else begin
          addr <= in_sof ? AW'(1) : addr + 1'b1;
        end
      end
    end
  end

  dual_clock_ram #(.WIDTH(DISP_W), .DEPTH(NPIX)) u_mem (
    .wclk(clk), .we(we), .waddr(waddr), .wdata(wdata),
    .rclk(rclk), .raddr(raddr), .rdata(rdata)
  );
endmodule
