// tb_stereo_depth_top_full: the end-to-end test of stereo_depth_top at its
// default sizes (320 x 240, 5 x 5 window, 32 disparities, 100 kHz SCCB with
// a 1 ms reset wait): one complete stereo frame from camera configuration
// to the depth image (checks in stereo_env).
module tb_stereo_depth_top_full;
  localparam int IMG_W = 320, IMG_H = 240;
  localparam int YW = $clog2(IMG_H + 1), AW = $clog2(IMG_W * IMG_H);

  logic rst_n, clk_cfg, clk_disp, clk_rd;
  logic cam_l_pclk, cam_l_vsync, cam_l_href, cam_r_pclk, cam_r_vsync, cam_r_href;
  logic [7:0] cam_l_d, cam_r_d;
  logic cam_sioc, cam_siod_o, cam_siod_oe, cfg_restart, cfg_done;
  logic signed [8:0] exp_off_l, exp_off_r;
  logic signed [YW:0] voff_l, voff_r;
  logic disp_busy, depth_frame_done;
  logic [15:0] depth_frames, pairs;
  logic [AW-1:0] depth_raddr, avg_raddr;
  logic [7:0] depth_rdata;
  logic [3:0] avg_rdata;

  stereo_depth_top dut (.*);

  stereo_env #(.IMG_W(IMG_W), .IMG_H(IMG_H), .WIN(5), .MAX_DISP(32),
               .D0(9), .V(3), .B(48), .HBLANK(144), .NFRAMES(1), .WATCHDOG(200_000_000)) env (
    .*,
    .ev_exp_r(dut.er_valid), .ev_drop_r(dut.wr_drop), .ev_cache_ld(dut.tap_valid),
    .ev_ssd(dut.u_disp.state == 2'd3 && dut.u_disp.pix_ok), .ev_avg_done(dut.avg_frame_done));
endmodule
