// tb_exposure_correction: random luminance samples and signed offsets;
// checks the clamped, 4-bit result, the saturation flag, the pass-through
// of column and row, and the one-clock latency.
module tb_exposure_correction;
  logic clk = 0, rst_n = 0;
  logic signed [8:0] offset;
  logic in_valid;
  logic [7:0] in_y;
  logic [8:0] in_x;
  logic [7:0] in_row;
  logic out_valid, out_sat;
  logic [3:0] out_pix;
  logic [8:0] out_x;
  logic [7:0] out_row;
  int checks = 0, failures = 0, sat_lo = 0, sat_hi = 0;

  exposure_correction #(.IN_W(8), .PIX_W(4), .XW(9), .YW(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_y = 0; in_x = 0; in_row = 0; offset = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int s, e;
      logic ev;
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      in_y     = 8'($urandom);
      in_x     = 9'($urandom);
      in_row   = 8'($urandom);
      offset   = (t % 3 == 0) ? 9'sd0 : 9'($urandom);
      s = int'(in_y) + int'(offset);
      ev = in_valid;
      e = (s < 0) ? 0 : (s > 255) ? 255 : s;
      @(posedge clk); #1;
      checks++;
      if (out_valid !== ev || (ev && (int'(out_pix) != e / 16 || out_x != in_x || out_row != in_row
                                || out_sat != (s < 0 || s > 255)))) begin
        failures++;
        $display("mismatch y=%0d off=%0d: pix=%0d exp=%0d sat=%b", in_y, offset, out_pix, e / 16, out_sat);
      end
      if (ev && s < 0) sat_lo++;
      if (ev && s > 255) sat_hi++;
    end
    checks++;
    if (sat_lo == 0 || sat_hi == 0) begin
      failures++;
      $display("saturation not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
