// stereo_env: test environment for stereo_depth_top, shared by the
// reduced-size and the full-size end-to-end testbenches.
//
// It makes the clocks and reset, models both cameras (ov7670_model) looking
// at one synthetic scene: the right camera sees it D0 columns further
// right, V rows lower and B luminance steps brighter, and sets the
// rectification inputs to undo the last two (exp_off_r = -B,
// voff_r = -V). It decodes the SCCB bus, waits for NFRAMES depth frames and
// then reads the depth image and the average image back and checks them:
//  - pixels within WIN/2 of the border read 0;
//  - inner pixels whose window lies in the rectified overlap and whose
//    search range reaches D0 read D0 * 256 / MAX_DISP;
//  - the average image holds floor((L + R) / 2) of the rectified pair.
// It also checks the clocks one disparity frame takes against the formula
// in stereo_tb_pkg, that this meets 25 frames per second at the clk_disp
// period used, and that every mechanism of the pipeline occurred.
module stereo_env
  import stereo_tb_pkg::*;
#(
  parameter int IMG_W      = 320,
  parameter int IMG_H      = 240,
  parameter int WIN        = 5,
  parameter int MAX_DISP   = 32,
  parameter int D0         = 9,
  parameter int V          = 2,
  parameter int B          = 48,
  parameter int HBLANK     = 144,
  parameter int NFRAMES    = 1,
  parameter longint WATCHDOG = 200_000_000,  // time units
  localparam int YW = $clog2(IMG_H + 1),
  localparam int AW = $clog2(IMG_W * IMG_H)
) (
  output logic                rst_n,
  output logic                clk_cfg,
  output logic                clk_disp,
  output logic                clk_rd,
  output logic                cam_l_pclk, cam_l_vsync, cam_l_href,
  output logic [7:0]          cam_l_d,
  output logic                cam_r_pclk, cam_r_vsync, cam_r_href,
  output logic [7:0]          cam_r_d,
  input  logic                cam_sioc, cam_siod_o, cam_siod_oe,
  output logic                cfg_restart,
  input  logic                cfg_done,
  output logic signed [8:0]   exp_off_l, exp_off_r,
  output logic signed [YW:0]  voff_l, voff_r,
  input  logic                disp_busy,
  input  logic                depth_frame_done,
  input  logic [15:0]         depth_frames,
  input  logic [15:0]         pairs,
  output logic [AW-1:0]       depth_raddr,
  input  logic [7:0]          depth_rdata,
  output logic [AW-1:0]       avg_raddr,
  input  logic [3:0]          avg_rdata,
  // internal events, for the mechanism counts
  input  logic                ev_exp_r,     // right pixel through exposure correction
  input  logic                ev_drop_r,    // right pixel dropped by vertical offset
  input  logic                ev_cache_ld,  // pixel pair loaded into the row caches
  input  logic                ev_ssd,       // one SSD candidate evaluated
  input  logic                ev_avg_done   // average image frame completed
);
  localparam int HW = (WIN - 1) / 2;
  localparam int SCALE = 256 / MAX_DISP;
  localparam int DISP_HALF = 8;    // clk_disp 62.5 MHz with 1 ns units

  int checks = 0, failures = 0;
  int n_sccb = 0, n_exp = 0, n_drop = 0, n_load = 0, n_avg = 0, n_depth = 0;
  longint n_ssd = 0, busy_cycles = 0, first_busy = 0;
  int n_border = 0, n_match = 0, n_short = 0, n_unchecked = 0;
  logic prev_scl = 1, prev_sda = 1;
  int frames_l, frames_r;

  initial begin clk_cfg = 0;  forever #10 clk_cfg = ~clk_cfg; end     // 50 MHz
  initial begin clk_disp = 0; forever #(DISP_HALF) clk_disp = ~clk_disp; end
  initial begin clk_rd = 0;   forever #20 clk_rd = ~clk_rd; end

  ov7670_model #(.IMG_W(IMG_W), .IMG_H(IMG_H), .PCLK_HALF(20), .HBLANK(HBLANK),
                 .VS_LINES(3), .TOP(3), .BOT(2)) cam_l (
    .pclk(cam_l_pclk), .vsync(cam_l_vsync), .href(cam_l_href), .d(cam_l_d), .frames(frames_l));
  ov7670_model #(.IMG_W(IMG_W), .IMG_H(IMG_H), .PCLK_HALF(21), .HBLANK(HBLANK),
                 .VS_LINES(3), .TOP(3), .BOT(2), .SHIFT_X(D0), .SHIFT_Y(V), .BRIGHT(B)) cam_r (
    .pclk(cam_r_pclk), .vsync(cam_r_vsync), .href(cam_r_href), .d(cam_r_d), .frames(frames_r));

  initial begin
    #(WATCHDOG);
    failures++;
    $display("watchdog: depth_frames=%0d pairs=%0d cfg_done=%b", depth_frames, pairs, cfg_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // SCCB start conditions
  always @(posedge clk_cfg) begin
    logic sda;
    sda = cam_siod_oe ? cam_siod_o : 1'b1;
    if (cam_sioc && prev_scl && prev_sda && !sda) n_sccb++;
    prev_scl <= cam_sioc;
    prev_sda <= sda;
  end

  always @(posedge cam_r_pclk) begin
    if (ev_exp_r && exp_off_r != 0) n_exp++;
    if (ev_drop_r) n_drop++;
  end

  always @(posedge clk_disp) begin
    if (ev_cache_ld) n_load++;
    if (ev_ssd) n_ssd++;
    if (ev_avg_done) n_avg++;
    if (depth_frame_done) n_depth++;
    if (disp_busy && depth_frames == 0) first_busy++;
  end

  function automatic int exp_depth(input int x, input int y, output bit known);
    known = 1;
    if (!(y >= HW && y < IMG_H - HW && x >= HW && x < IMG_W - HW)) return 0;
    if (y + HW <= IMG_H - 1 - V && x - HW >= D0 && D0 < MAX_DISP) return D0 * SCALE;
    known = 0;
    return 0;
  endfunction

  task automatic expect_count(input string what, input longint got, input longint lo);
    checks++;
    $display("mechanism %-28s %0d", what, got);
    if (got < lo) begin
      failures++;
      $display("  expected at least %0d", lo);
    end
  endtask

  initial begin
    longint unsigned expc;
    rst_n = 0; cfg_restart = 0;
    exp_off_l = 0; exp_off_r = 9'(-B);
    voff_l = 0; voff_r = (YW+1)'(-V);
    depth_raddr = '0; avg_raddr = '0;
    #100;
    rst_n = 1;
    wait (depth_frames == 16'(NFRAMES));
    repeat (4) @(posedge clk_rd);

    // depth image
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) begin
        bit known;
        int e;
        @(negedge clk_rd); depth_raddr = AW'(y * IMG_W + x);
        @(posedge clk_rd); #1;
        e = exp_depth(x, y, known);
        if (!known) begin n_unchecked++; continue; end
        checks++;
        if (y >= HW && y < IMG_H - HW && x >= HW && x < IMG_W - HW) begin
          n_match++;
          if (x - HW + 1 < MAX_DISP) n_short++;
        end else n_border++;
        if (int'(depth_rdata) != e) begin
          failures++;
          if (failures < 10) $display("depth (%0d,%0d) = %0d, expected %0d", x, y, depth_rdata, e);
        end
      end

    // average image over the rectified overlap
    for (int y = 0; y <= IMG_H - 1 - V; y++)
      for (int x = 0; x < IMG_W; x++) begin
        int e;
        @(negedge clk_rd); avg_raddr = AW'(y * IMG_W + x);
        @(posedge clk_rd); #1;
        e = (int'(tex(x, y)) + int'(tex(x + D0, y))) / 2;
        checks++;
        if (int'(avg_rdata) != e) begin
          failures++;
          if (failures < 10) $display("average (%0d,%0d) = %0d, expected %0d", x, y, avg_rdata, e);
        end
      end

    // timing of one disparity frame
    expc = disp_cycles(IMG_W, IMG_H, WIN, MAX_DISP);
    checks++;
    $display("disparity frame: %0d clk_disp cycles (expected %0d), %0d ns at %0d ns per clock",
             first_busy, expc, first_busy * 2 * DISP_HALF, 2 * DISP_HALF);
    if (first_busy != longint'(expc)) failures++;
    checks++;
    if (first_busy * 2 * DISP_HALF > 40_000_000) begin
      failures++;
      $display("slower than 25 frames per second");
    end

    expect_count("SCCB register writes", n_sccb, 6);
    expect_count("stereo pairs captured", pairs, NFRAMES);
    expect_count("exposure-corrected pixels", n_exp, IMG_W * IMG_H / 2);
    expect_count("rows dropped by offset (px)", n_drop, V * IMG_W);
    expect_count("pixels loaded to caches", n_load, NFRAMES * IMG_W * IMG_H);
    expect_count("SSD candidates evaluated", n_ssd, 1);
    expect_count("border pixels (zero)", n_border, 1);
    expect_count("D0 matches checked", n_match, 1);
    expect_count("truncated searches", n_short, 1);
    expect_count("average frames", n_avg, NFRAMES);
    expect_count("depth frames accumulated", n_depth, NFRAMES);
    $display("unchecked pixels (outside overlap or search): %0d", n_unchecked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
