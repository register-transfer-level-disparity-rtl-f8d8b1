// tb_disparity_generator: runs the matcher on a 40 x 14 image pair held in
// a block RAM model with one clock of read latency, and checks every output
// pixel against a brute-force SSD search done here (same window, same
// search limits, smallest d on a tie), the raster order of the tap stream
// of loaded pixels, and the number of clocks a frame takes.
// Frame 1: the right image is the left one moved 6 columns (plus noise on
// a few pixels); frame 2: independent random images (many ties and edge
// cases).
module tb_disparity_generator
  import stereo_tb_pkg::*;
;
  localparam int W = 40, HH = 14, WIN = 5, MAXD = 16, HW = (WIN - 1) / 2;
  localparam int SCALE = 256 / MAXD;
  localparam int N = W * HH;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [9:0] rd_addr;
  logic [3:0] rd_l, rd_r, tap_l, tap_r;
  logic tap_valid, tap_sof, out_valid, out_sof;
  logic [7:0] out_disp;
  logic [3:0] iml [N], imr [N];
  int checks = 0, failures = 0, nout = 0, ntap = 0, shift_hits = 0;
  longint unsigned busy_cycles = 0;

  disparity_generator #(.IMG_W(W), .IMG_H(HH), .WIN(WIN), .MAX_DISP(MAXD)) dut (.*);

  always #5 clk = ~clk;

  // block RAM model
  always @(posedge clk) begin
    rd_l <= iml[rd_addr];
    rd_r <= imr[rd_addr];
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_disp(input int x, input int y);
    int best, bd, s, dd;
    if (!(y >= HW && y < HH - HW && x >= HW && x < W - HW)) return 0;
    best = -1; bd = 0;
    for (int d = 0; d < MAXD && x - d - HW >= 0; d++) begin
      s = 0;
      for (int j = -HW; j <= HW; j++)
        for (int i = -HW; i <= HW; i++) begin
          dd = int'(iml[(y + j) * W + x + i]) - int'(imr[(y + j) * W + x + i - d]);
          s += dd * dd;
        end
      if (best < 0 || s < best) begin best = s; bd = d; end
    end
    return bd * SCALE;
  endfunction

  always @(posedge clk) begin
    if (busy) busy_cycles++;
    if (out_valid) begin
      int x, y, e;
      x = nout % W; y = nout / W;
      e = ref_disp(x, y);
      checks++;
      if (int'(out_disp) != e || out_sof != (nout == 0)) begin
        failures++;
        if (failures < 10) $display("pixel (%0d,%0d): got %0d expected %0d sof=%b", x, y, out_disp, e, out_sof);
      end
      if (e == 6 * SCALE) shift_hits++;
      nout++;
    end
    if (tap_valid) begin
      checks++;
      if (tap_l != iml[ntap] || tap_r != imr[ntap] || tap_sof != (ntap == 0)) begin
        failures++;
        if (failures < 10) $display("tap %0d wrong", ntap);
      end
      ntap++;
    end
  end

  task automatic run_frame();
    longint unsigned expc;
    nout = 0; ntap = 0; busy_cycles = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    repeat (2) @(posedge clk);
    expc = disp_cycles(W, HH, WIN, MAXD);
    checks += 3;
    if (nout != N) begin failures++; $display("%0d output pixels, expected %0d", nout, N); end
    if (ntap != N) begin failures++; $display("%0d tapped pixels, expected %0d", ntap, N); end
    if (busy_cycles != expc) begin
      failures++;
      $display("frame took %0d clocks, expected %0d", busy_cycles, expc);
    end
  endtask

  initial begin
    for (int y = 0; y < HH; y++)
      for (int x = 0; x < W; x++) begin
        iml[y * W + x] = 4'(tex(x, y));
        imr[y * W + x] = 4'(tex(x + 6, y));
        if ($urandom % 16 == 0) imr[y * W + x] = 4'($urandom);
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame();
    checks++;
    if (shift_hits < (W - 2 * HW - 6) * (HH - 2 * HW) / 2) begin
      failures++;
      $display("shift found at only %0d pixels", shift_hits);
    end
    for (int a = 0; a < N; a++) begin
      iml[a] = 4'($urandom);
      imr[a] = 4'($urandom % 3);
    end
    repeat (5) @(posedge clk);
    run_frame();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
