// tb_stereo_buffer: fills the left and right RAMs of an 8 x 6 buffer from
// two unrelated write clocks with random data, then reads every address in
// the read clock domain and compares both outputs with a model, including
// the one-clock read latency. A second pass overwrites random addresses.
module tb_stereo_buffer;
  localparam int W = 8, HH = 6, N = W * HH;
  logic wclk_l = 0, wclk_r = 0, rclk = 0;
  logic we_l = 0, we_r = 0;
  logic [5:0] waddr_l = 0, waddr_r = 0, raddr = 0;
  logic [3:0] wdata_l = 0, wdata_r = 0, rdata_l, rdata_r;
  logic [3:0] ml [N], mr [N];
  int checks = 0, failures = 0;
  bit l_done = 0, r_done = 0;

  stereo_buffer #(.IMG_W(W), .IMG_H(HH), .PIX_W(4)) dut (.*);

  always #5 wclk_l = ~wclk_l;
  always #7 wclk_r = ~wclk_r;
  always #4 rclk = ~rclk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_l(input int pass);
    for (int a = 0; a < N; a++) begin
      if (pass > 0 && ($urandom % 2)) continue;
      @(negedge wclk_l);
      we_l = 1; waddr_l = 6'(a); wdata_l = 4'($urandom); ml[a] = wdata_l;
    end
    @(negedge wclk_l); we_l = 0;
    l_done = 1;
  endtask

  task automatic write_r(input int pass);
    for (int a = 0; a < N; a++) begin
      if (pass > 0 && ($urandom % 2)) continue;
      @(negedge wclk_r);
      we_r = 1; waddr_r = 6'(a); wdata_r = 4'($urandom); mr[a] = wdata_r;
    end
    @(negedge wclk_r); we_r = 0;
    r_done = 1;
  endtask

  task automatic read_all();
    for (int a = 0; a < N; a++) begin
      @(negedge rclk); raddr = 6'(a);
      @(posedge rclk); #1;
      checks++;
      if (rdata_l != ml[a] || rdata_r != mr[a]) begin
        failures++;
        $display("addr %0d: got %h/%h expected %h/%h", a, rdata_l, rdata_r, ml[a], mr[a]);
      end
    end
  endtask

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      l_done = 0; r_done = 0;
      fork
        write_l(pass);
        write_r(pass);
      join
      read_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
