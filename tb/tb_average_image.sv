// tb_average_image: streams three 8 x 4 frames, each after an abandoned partial frame, of random left/right pixel
// pairs, with gaps, into average_image and reads the stored image back on
// a separate read clock; every pixel must be floor((L + R) / 2). Also
// checks that frame_done pulses once per frame.
module tb_average_image;
  localparam int W = 8, HH = 4, N = W * HH;
  logic clk = 0, rclk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0, frame_done;
  logic [3:0] in_l = 0, in_r = 0, rdata;
  logic [4:0] raddr = 0;
  int expv [N];
  int checks = 0, failures = 0, done_pulses = 0;

  average_image #(.IMG_W(W), .IMG_H(HH), .PIX_W(4)) dut (.*);

  always #5 clk = ~clk;
  always #6 rclk = ~rclk;
  always @(posedge clk) if (rst_n && frame_done) done_pulses++;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      // an abandoned partial frame: the next start of frame must restart at 0
      for (int a = 0; a < 5 + f; a++) begin
        @(negedge clk);
        in_valid = 1; in_sof = (a == 0);
      end
      for (int a = 0; a < N; a++) begin
        @(negedge clk);
        while ($urandom % 3 == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1; in_sof = (a == 0);
        in_l = 4'($urandom); in_r = 4'($urandom);
        if (f == 2 && a < 2) begin in_l = 4'hF; in_r = 4'hF; end
        expv[a] = (int'(in_l) + int'(in_r)) / 2;
      end
      @(negedge clk); in_valid = 0; in_sof = 0;
      repeat (3) @(posedge clk);
      for (int a = 0; a < N; a++) begin
        @(negedge rclk); raddr = 5'(a);
        @(posedge rclk); #1;
        checks++;
        if (int'(rdata) != expv[a]) begin
          failures++;
          $display("frame %0d addr %0d: got %0d expected %0d", f, a, rdata, expv[a]);
        end
      end
      checks++;
      if (done_pulses != f + 1) begin
        failures++;
        $display("frame_done pulses %0d, expected %0d", done_pulses, f + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
