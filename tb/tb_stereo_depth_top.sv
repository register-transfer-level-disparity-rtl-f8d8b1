// tb_stereo_depth_top: end-to-end test of the whole pipeline at a reduced
// size (48 x 24 pixels, 16 disparities, fast configuration bus): camera
// configuration, capture of two stereo pairs, rectification, matching and
// read-back of the depth and average images (checks in stereo_env).
module tb_stereo_depth_top;
  localparam int IMG_W = 48, IMG_H = 24, WIN = 5, MAX_DISP = 16;
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

  stereo_depth_top #(.IMG_W(IMG_W), .IMG_H(IMG_H), .WIN(WIN), .MAX_DISP(MAX_DISP),
                     .SCCB_QDIV(4), .CFG_GAP(20), .RESET_WAIT(200)) dut (.*);

  stereo_env #(.IMG_W(IMG_W), .IMG_H(IMG_H), .WIN(WIN), .MAX_DISP(MAX_DISP),
               .D0(5), .V(2), .B(48), .HBLANK(16), .NFRAMES(2), .WATCHDOG(20_000_000)) env (
    .*,
    .ev_exp_r(dut.er_valid), .ev_drop_r(dut.wr_drop), .ev_cache_ld(dut.tap_valid),
    .ev_ssd(dut.u_disp.state == 2'd3 && dut.u_disp.pix_ok), .ev_avg_done(dut.avg_frame_done));
endmodule
