// stereo_depth_top: stereo-vision depth map pipeline for two OV7670
// cameras. Five stages, in order:
//   1. image acquisition - i2c_camera_controller configures both cameras;
//      one camera_capture per camera receives a frame on demand;
//   2. image rectification - per camera, exposure_correction (brightness
//      offset, 8-bit luminance to 4-bit pixel) and
//      vertical_offset_correction (row shift);
//   3. stereo buffer - stereo_buffer, left and right 320 x 240 x 4-bit RAMs;
//   4. disparity generator - disparity_generator, block-wise cached SSD
//      matching, which also feeds average_image, the debug mean of the pair;
//   5. output buffer - output_buffer, the 320 x 240 x 8-bit depth image.
// frame_sequencer alternates capture and matching so that one set of
// buffers suffices.
//
// Clock domains (each with its own synchronised reset from `rst_n`):
//   clk_cfg   configuration (50 MHz: SCCB timing assumes it),
//   cam_*_pclk each camera's pixel clock (cameras fed 25 MHz externally),
//   clk_disp  disparity generator, buffer read side, sequencer,
//   clk_rd    read ports of the depth and average images (display side).
// A frame takes 2,348,880 clk_disp cycles at the default sizes, so 25
// frames per second needs clk_disp >= 58.8 MHz; the capture of a frame pair
// adds one camera frame time.
//
// The correction inputs (`exp_off_*`, `voff_*`) are quasi-static settings
// used directly in the pixel-clock domains; change them between frames.
// The SCCB pins of both cameras are driven by the same signals.
// Stage order, frame size, pixel widths, the SSD cost and block-wise
// caching follow the design; all interfaces, the clocking arrangement and
// the sequencing are this implementation's choices.
module stereo_depth_top
  import stereo_pkg::*;
#(
  parameter int unsigned IMG_W      = IMG_W_DEF,     // 320
  parameter int unsigned IMG_H      = IMG_H_DEF,     // 240
  parameter int unsigned WIN        = WIN_DEF,       // 5
  parameter int unsigned MAX_DISP   = MAX_DISP_DEF,  // 32
  parameter int unsigned SCCB_QDIV  = 125,
  parameter int unsigned CFG_GAP    = 500,
  parameter int unsigned RESET_WAIT = 50_000,
  localparam int unsigned XW = $clog2(IMG_W),
  localparam int unsigned YW = $clog2(IMG_H + 1),
  localparam int unsigned AW = $clog2(IMG_W * IMG_H)
) (
  input  logic                rst_n,
  input  logic                clk_cfg,
  input  logic                clk_disp,
  input  logic                clk_rd,
  // left camera bus
  input  logic                cam_l_pclk,
  input  logic                cam_l_vsync,
  input  logic                cam_l_href,
  input  logic [CAM_W-1:0]    cam_l_d,
  // right camera bus
  input  logic                cam_r_pclk,
  input  logic                cam_r_vsync,
  input  logic                cam_r_href,
  input  logic [CAM_W-1:0]    cam_r_d,
  // camera configuration bus (shared)
  output logic                cam_sioc,
  output logic                cam_siod_o,
  output logic                cam_siod_oe,
  input  logic                cfg_restart,
  output logic                cfg_done,
  // rectification settings
  input  logic signed [CAM_W:0] exp_off_l,
  input  logic signed [CAM_W:0] exp_off_r,
  input  logic signed [YW:0]    voff_l,
  input  logic signed [YW:0]    voff_r,
  // status (clk_disp domain)
  output logic                disp_busy,
  output logic                depth_frame_done,
  output logic [15:0]         depth_frames,
  output logic [15:0]         pairs,
  // image read ports (clk_rd domain)
  input  logic [AW-1:0]       depth_raddr,
  output logic [DISP_W-1:0]   depth_rdata,
  input  logic [AW-1:0]       avg_raddr,
  output logic [PIX_W-1:0]    avg_rdata
);
  logic rst_cfg_n, rst_disp_n, rst_pl_n, rst_pr_n;

  reset_sync u_rs_cfg  (.clk(clk_cfg),    .rst_n_in(rst_n), .rst_n_out(rst_cfg_n));
  reset_sync u_rs_disp (.clk(clk_disp),   .rst_n_in(rst_n), .rst_n_out(rst_disp_n));
  reset_sync u_rs_l    (.clk(cam_l_pclk), .rst_n_in(rst_n), .rst_n_out(rst_pl_n));
  reset_sync u_rs_r    (.clk(cam_r_pclk), .rst_n_in(rst_n), .rst_n_out(rst_pr_n));

  // ---------------- image acquisition ----------------
  logic [3:0] cfg_writes;

  i2c_camera_controller #(.QDIV(SCCB_QDIV), .GAP(CFG_GAP), .RESET_WAIT(RESET_WAIT)) u_cfg (
    .clk(clk_cfg), .rst_n(rst_cfg_n), .restart(cfg_restart),
    .cfg_done(cfg_done), .writes(cfg_writes),
    .sioc(cam_sioc), .siod_o(cam_siod_o), .siod_oe(cam_siod_oe)
  );

  logic capture_req, ack_l, ack_r;

  // left camera path
  logic          cl_valid, el_valid, el_sat, wl_we, wl_drop, cl_capturing;
  logic [7:0]    cl_y;
  logic [XW-1:0] cl_x, el_x;
  logic [YW-1:0] cl_row, el_row;
  logic [PIX_W-1:0] el_pix, wl_data;
  logic [AW-1:0] wl_addr;

  camera_capture #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_cap_l (
    .pclk(cam_l_pclk), .rst_n(rst_pl_n),
    .vsync(cam_l_vsync), .href(cam_l_href), .d(cam_l_d),
    .capture_req(capture_req), .capture_ack(ack_l),
    .pix_valid(cl_valid), .pix_y(cl_y), .pix_x(cl_x), .pix_row(cl_row),
    .capturing(cl_capturing)
  );

  exposure_correction #(.IN_W(CAM_W), .PIX_W(PIX_W), .XW(XW), .YW(YW)) u_exp_l (
    .clk(cam_l_pclk), .rst_n(rst_pl_n), .offset(exp_off_l),
    .in_valid(cl_valid), .in_y(cl_y), .in_x(cl_x), .in_row(cl_row),
    .out_valid(el_valid), .out_pix(el_pix), .out_x(el_x), .out_row(el_row), .out_sat(el_sat)
  );

  vertical_offset_correction #(.IMG_W(IMG_W), .IMG_H(IMG_H), .PIX_W(PIX_W)) u_vof_l (
    .clk(cam_l_pclk), .rst_n(rst_pl_n), .voffset(voff_l),
    .in_valid(el_valid), .in_pix(el_pix), .in_x(el_x), .in_row(el_row),
    .we(wl_we), .waddr(wl_addr), .wdata(wl_data), .dropped(wl_drop)
  );

  // right camera path
  logic          cr_valid, er_valid, er_sat, wr_we, wr_drop, cr_capturing;
  logic [7:0]    cr_y;
  logic [XW-1:0] cr_x, er_x;
  logic [YW-1:0] cr_row, er_row;
  logic [PIX_W-1:0] er_pix, wr_data;
  logic [AW-1:0] wr_addr;

  camera_capture #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_cap_r (
    .pclk(cam_r_pclk), .rst_n(rst_pr_n),
    .vsync(cam_r_vsync), .href(cam_r_href), .d(cam_r_d),
    .capture_req(capture_req), .capture_ack(ack_r),
    .pix_valid(cr_valid), .pix_y(cr_y), .pix_x(cr_x), .pix_row(cr_row),
    .capturing(cr_capturing)
  );

  exposure_correction #(.IN_W(CAM_W), .PIX_W(PIX_W), .XW(XW), .YW(YW)) u_exp_r (
    .clk(cam_r_pclk), .rst_n(rst_pr_n), .offset(exp_off_r),
    .in_valid(cr_valid), .in_y(cr_y), .in_x(cr_x), .in_row(cr_row),
    .out_valid(er_valid), .out_pix(er_pix), .out_x(er_x), .out_row(er_row), .out_sat(er_sat)
  );

  vertical_offset_correction #(.IMG_W(IMG_W), .IMG_H(IMG_H), .PIX_W(PIX_W)) u_vof_r (
    .clk(cam_r_pclk), .rst_n(rst_pr_n), .voffset(voff_r),
    .in_valid(er_valid), .in_pix(er_pix), .in_x(er_x), .in_row(er_row),
    .we(wr_we), .waddr(wr_addr), .wdata(wr_data), .dropped(wr_drop)
  );

  // ---------------- stereo buffer ----------------
  logic [AW-1:0]    rd_addr;
  logic [PIX_W-1:0] rd_l, rd_r;

  stereo_buffer #(.IMG_W(IMG_W), .IMG_H(IMG_H), .PIX_W(PIX_W)) u_buf (
    .wclk_l(cam_l_pclk), .we_l(wl_we), .waddr_l(wl_addr), .wdata_l(wl_data),
    .wclk_r(cam_r_pclk), .we_r(wr_we), .waddr_r(wr_addr), .wdata_r(wr_data),
    .rclk(clk_disp), .raddr(rd_addr), .rdata_l(rd_l), .rdata_r(rd_r)
  );

  // ---------------- sequencing ----------------
  logic disp_start, disp_done;

  frame_sequencer u_seq (
    .clk(clk_disp), .rst_n(rst_disp_n), .cfg_done(cfg_done),
    .ack_l(ack_l), .ack_r(ack_r), .capture_req(capture_req),
    .disp_start(disp_start), .disp_done(disp_done), .pairs(pairs)
  );

  // ---------------- disparity generator ----------------
  logic              tap_valid, tap_sof;
  logic [PIX_W-1:0]  tap_l, tap_r;
  logic              d_valid, d_sof;
  logic [DISP_W-1:0] d_pix;

  disparity_generator #(.IMG_W(IMG_W), .IMG_H(IMG_H), .WIN(WIN), .MAX_DISP(MAX_DISP)) u_disp (
    .clk(clk_disp), .rst_n(rst_disp_n), .start(disp_start),
    .busy(disp_busy), .done(disp_done),
    .rd_addr(rd_addr), .rd_l(rd_l), .rd_r(rd_r),
    .tap_valid(tap_valid), .tap_sof(tap_sof), .tap_l(tap_l), .tap_r(tap_r),
    .out_valid(d_valid), .out_sof(d_sof), .out_disp(d_pix)
  );

  logic avg_frame_done;

  average_image #(.IMG_W(IMG_W), .IMG_H(IMG_H), .PIX_W(PIX_W)) u_avg (
    .clk(clk_disp), .rst_n(rst_disp_n),
    .in_valid(tap_valid), .in_sof(tap_sof), .in_l(tap_l), .in_r(tap_r),
    .frame_done(avg_frame_done),
    .rclk(clk_rd), .raddr(avg_raddr), .rdata(avg_rdata)
  );

  // ---------------- output buffer ----------------
  output_buffer #(.IMG_W(IMG_W), .IMG_H(IMG_H), .DISP_W(DISP_W)) u_out (
    .clk(clk_disp), .rst_n(rst_disp_n),
    .in_valid(d_valid), .in_sof(d_sof), .in_pix(d_pix),
    .frame_done(depth_frame_done), .frames(depth_frames),
    .rclk(clk_rd), .raddr(depth_raddr), .rdata(depth_rdata)
  );
endmodule
