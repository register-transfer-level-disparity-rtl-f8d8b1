// stereo_buffer: the left and right frame buffers of the stereo pair.
//
// Two block RAMs of IMG_W * IMG_H pixels of PIX_W bits (320 x 240 x 4 bits
// each by default). Each is written from its own camera's pixel clock
// (`wclk_l`, `wclk_r`) and both are read in the disparity clock domain at one
// shared address `raddr`, so a left and a right pixel of the same position
// come out together, one `rclk` edge after the address. Row-major
// addressing: address = row * IMG_W + column.
// Sizes follow the design's memory budget; the clocking arrangement is
// this implementation's choice.
module stereo_buffer #(
  parameter int unsigned IMG_W = 320,
  parameter int unsigned IMG_H = 240,
  parameter int unsigned PIX_W = 4,
  localparam int unsigned AW   = $clog2(IMG_W * IMG_H)
) (
  input  logic             wclk_l,
  input  logic             we_l,
  input  logic [AW-1:0]    waddr_l,
  input  logic [PIX_W-1:0] wdata_l,
  input  logic             wclk_r,
  input  logic             we_r,
  input  logic [AW-1:0]    waddr_r,
  input  logic [PIX_W-1:0] wdata_r,
  input  logic             rclk,
  input  logic [AW-1:0]    raddr,
  output logic [PIX_W-1:0] rdata_l,
  output logic [PIX_W-1:0] rdata_r
);
  dual_clock_ram #(.WIDTH(PIX_W), .DEPTH(IMG_W * IMG_H)) u_left (
    .wclk(wclk_l), .we(we_l), .waddr(waddr_l), .wdata(wdata_l),
    .rclk(rclk), .raddr(raddr), .rdata(rdata_l)
  );

  dual_clock_ram #(.WIDTH(PIX_W), .DEPTH(IMG_W * IMG_H)) u_right (
    .wclk(wclk_r), .we(we_r), .waddr(waddr_r), .wdata(wdata_r),
    .rclk(rclk), .raddr(raddr), .rdata(rdata_r)
  );
endmodule
