// tb_ssd_unit: drives random and extreme 5x5 window pairs into ssd_unit and
// compares the result with a sum of squared differences computed here.
module tb_ssd_unit;
  localparam int WIN = 5;
  localparam int PIX_W = 4;
  localparam int N = WIN * WIN;

  logic [N-1:0][PIX_W-1:0] wl, wr;
  logic [13:0] ssd;
  int checks = 0, failures = 0;
  logic clk = 0;

  ssd_unit #(.WIN(WIN), .PIX_W(PIX_W)) dut (.win_l(wl), .win_r(wr), .ssd(ssd));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    int ref_ssd = 0;
    for (int k = 0; k < N; k++) begin
      int dd = int'(wl[k]) - int'(wr[k]);
      ref_ssd += dd * dd;
    end
    #1;
    checks++;
    if (int'(ssd) != ref_ssd) begin
      failures++;
      $display("mismatch: ssd=%0d expected %0d", ssd, ref_ssd);
    end
  endtask

  initial begin
    wl = '0; wr = '0; check_one();
    wl = '1; wr = '0; check_one();          // 25 * 225 = 5625, the maximum
    wl = '0; wr = '1; check_one();
    for (int t = 0; t < 2000; t++) begin
      for (int k = 0; k < N; k++) begin
        wl[k] = PIX_W'($urandom);
        wr[k] = PIX_W'($urandom);
      end
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
