// tb_i2c_camera_controller: decodes the SCCB bus the controller drives (as
// a camera would: start and stop conditions, data sampled on rising SIO_C)
// and checks each write: device ID 0x42, register address and value
// against the OV7670 settings list, SIO_D released in every ninth bit
// slot, the wait after the soft reset, that cfg_done rises only after the
// last write, and that a restart pulse sends the whole list again.
module tb_i2c_camera_controller;
  localparam int QDIV = 3, GAP = 10, RESET_WAIT = 300;
  localparam int NREG = 6;
  localparam logic [15:0] EXP [NREG] = '{16'h1280, 16'h1210, 16'h1101, 16'h3A04, 16'h3D88, 16'h40C0};

  logic clk = 0, rst_n = 0, restart = 0;
  logic cfg_done, sioc, siod_o, siod_oe;
  logic [3:0] writes;
  int checks = 0, failures = 0;
  int nwr = 0, nbits = 0, cycle = 0, last_stop = 0;
  logic [27:0] sh;   // 27 bit slots plus the SIO_C rise of the stop condition
  logic prev_scl = 1, prev_sda = 1;
  logic sda;

  i2c_camera_controller #(.QDIV(QDIV), .GAP(GAP), .RESET_WAIT(RESET_WAIT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign sda = siod_oe ? siod_o : 1'b1;   // pull-up when released

  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      if (sioc && prev_scl && prev_sda && !sda) begin
        nbits = 0;                                    // start condition
        if (nwr % NREG == 1) begin
          checks++;
          if (cycle - last_stop < RESET_WAIT) begin
            failures++;
            $display("only %0d clocks after soft reset", cycle - last_stop);
          end
        end
      end else if (sioc && prev_scl && !prev_sda && sda) begin
        checks++;                                      // stop condition
        last_stop = cycle;
        if (nbits != 28 || sh[27:20] != 8'h42 || {sh[18:11], sh[9:2]} != EXP[nwr % NREG]) begin
          failures++;
          $display("write %0d: bits=%0d id=%h reg=%h val=%h", nwr, nbits, sh[27:20], sh[18:11], sh[9:2]);
        end
        checks++;
        if (cfg_done) begin failures++; $display("cfg_done before last write finished"); end
        nwr++;
      end else if (sioc && !prev_scl) begin
        sh = {sh[26:0], sda};                          // data bit
        if (nbits == 8 || nbits == 17 || nbits == 26) begin
          checks++;
          if (siod_oe) begin failures++; $display("SIO_D driven in don't-care slot"); end
        end
        nbits++;
      end
    end
    prev_scl <= sioc;
    prev_sda <= sda;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (cfg_done);
    checks++;
    if (nwr != NREG || writes != 4'(NREG)) begin
      failures++;
      $display("%0d writes seen, counter %0d, expected %0d", nwr, writes, NREG);
    end
    repeat (20) @(posedge clk);
    @(negedge clk) restart = 1;
    @(negedge clk) restart = 0;
    wait (cfg_done);
    checks++;
    if (nwr != 2 * NREG) begin
      failures++;
      $display("%0d writes after restart, expected %0d", nwr, 2 * NREG);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
