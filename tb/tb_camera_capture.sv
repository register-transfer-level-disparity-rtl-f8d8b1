// tb_camera_capture: an OV7670 bus model sends 8 x 4 frames continuously.
// Checks that nothing is captured before a request, that one requested
// frame yields exactly 32 pixels whose luminance, column and row match the
// model's even (Y) bytes, that capture_ack completes the four-phase
// handshake, and that a second request captures the next frame.
module tb_camera_capture
  import stereo_tb_pkg::*;
;
  localparam int W = 8, HH = 4;
  logic pclk, vsync, href;
  logic [7:0] d;
  int frames;
  logic rst_n = 0, capture_req = 0, capture_ack, pix_valid, capturing;
  logic [7:0] pix_y;
  logic [2:0] pix_x;
  logic [2:0] pix_row;
  int checks = 0, failures = 0, npix = 0;
  int exp_x = 0, exp_y = 0;

  ov7670_model #(.IMG_W(W), .IMG_H(HH), .PCLK_HALF(20), .HBLANK(6), .VS_LINES(1),
                 .TOP(1), .BOT(1), .SHIFT_X(3), .SHIFT_Y(0), .BRIGHT(5)) cam (
    .pclk(pclk), .vsync(vsync), .href(href), .d(d), .frames(frames));

  camera_capture #(.IMG_W(W), .IMG_H(HH)) dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge pclk) begin
    if (pix_valid) begin
      int e;
      e = 16 * int'(tex(exp_x + 3, exp_y)) + 5;
      npix++;
      checks++;
      if (int'(pix_y) != e || int'(pix_x) != exp_x || int'(pix_row) != exp_y) begin
        failures++;
        $display("pixel %0d: y=%0d x=%0d row=%0d expected y=%0d x=%0d row=%0d",
                 npix, pix_y, pix_x, pix_row, e, exp_x, exp_y);
      end
      if (exp_x == W - 1) begin exp_x = 0; exp_y++; end
      else exp_x++;
    end
  end

  task automatic take_frame();
    int t;
    npix = 0; exp_x = 0; exp_y = 0;
    @(negedge pclk) capture_req = 1;
    t = 0;
    while (!capture_ack && t < 20000) begin @(posedge pclk); t++; end
    checks++;
    if (!capture_ack) begin failures++; $display("no ack"); end
    checks++;
    if (npix != W * HH) begin
      failures++;
      $display("captured %0d pixels, expected %0d", npix, W * HH);
    end
    @(negedge pclk) capture_req = 0;
    t = 0;
    while (capture_ack && t < 100) begin @(posedge pclk); t++; end
    checks++;
    if (capture_ack) begin failures++; $display("ack not released"); end
  endtask

  initial begin
    repeat (4) @(posedge pclk);
    rst_n = 1;
    // two whole frames pass without a request: nothing may be captured
    wait (frames == 3);
    checks++;
    if (npix != 0) begin failures++; $display("captured without request"); end
    take_frame();
    repeat (50) @(posedge pclk);
    take_frame();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
