// tb_vertical_offset_correction: random pixels and row offsets on a 16 x 12
// frame; checks the write address row*16 + column after the shift, that
// rows shifted out of the frame are dropped, and the one-clock latency.
module tb_vertical_offset_correction;
  localparam int W = 16, HH = 12;
  logic clk = 0, rst_n = 0;
  logic signed [4:0] voffset;
  logic in_valid;
  logic [3:0] in_pix;
  logic [3:0] in_x;
  logic [3:0] in_row;
  logic we, dropped;
  logic [7:0] waddr;
  logic [3:0] wdata;
  int checks = 0, failures = 0, drops = 0, writes = 0;

  vertical_offset_correction #(.IMG_W(W), .IMG_H(HH), .PIX_W(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_pix = 0; in_x = 0; in_row = 0; voffset = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int r;
      logic ok;
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      in_pix   = 4'($urandom);
      in_x     = 4'($urandom % W);
      in_row   = 4'($urandom % HH);
      voffset  = 5'(int'($urandom % 9) - 4);
      r  = int'(in_row) + int'(voffset);
      ok = (r >= 0 && r < HH);
      @(posedge clk); #1;
      checks++;
      if (we !== (in_valid && ok) || dropped !== (in_valid && !ok) ||
          (in_valid && ok && (int'(waddr) != r * W + int'(in_x) || wdata != in_pix))) begin
        failures++;
        $display("mismatch row=%0d off=%0d: we=%b addr=%0d exp=%0d", in_row, voffset, we, waddr, r * W + int'(in_x));
      end
      if (in_valid && ok) writes++;
      if (in_valid && !ok) drops++;
    end
    checks++;
    if (drops == 0 || writes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
