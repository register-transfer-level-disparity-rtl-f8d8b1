// ov7670_model: behavioural model of the output bus of an OV7670 camera in
// QVGA YUV 4:2:2 mode (byte order Y U Y V), for simulation only.
//
// It generates its own pixel clock (half period PCLK_HALF time units) and
// sends frames back to back: a VSYNC pulse of VS_LINES line times, TOP
// blank lines, then IMG_H lines each of 2*IMG_W bytes with HREF high,
// followed by HBLANK clocks with HREF low, then BOT blank lines. Outputs
// change on the falling edge of PCLK. The luminance of pixel (x, y) is
// 16 * tex(x + SHIFT_X, y - SHIFT_Y) + BRIGHT, so a second model with a
// non-zero SHIFT_X sees the same scene as from a camera further right, and
// SHIFT_Y / BRIGHT add a vertical misalignment and a brightness difference.
// Chroma bytes are 0x80. `frames` counts frames started.
module ov7670_model
  import stereo_tb_pkg::*;
#(
  parameter int IMG_W     = 320,
  parameter int IMG_H     = 240,
  parameter int PCLK_HALF = 20,
  parameter int HBLANK    = 16,
  parameter int VS_LINES  = 3,
  parameter int TOP       = 2,
  parameter int BOT       = 2,
  parameter int SHIFT_X   = 0,
  parameter int SHIFT_Y   = 0,
  parameter int BRIGHT    = 0
) (
  output logic       pclk,
  output logic       vsync,
  output logic       href,
  output logic [7:0] d,
  output int         frames
);
  localparam int LINE = 2 * IMG_W + HBLANK;

  initial begin
    pclk   = 1'b0;
    vsync  = 1'b0;
    href   = 1'b0;
    d      = 8'h00;
    frames = 0;
    forever #(PCLK_HALF) pclk = ~pclk;
  end

  task automatic idle_clocks(input int n);
    repeat (n) @(negedge pclk);
  endtask

  initial begin
    @(negedge pclk);
    forever begin
      frames = frames + 1;
      vsync  = 1'b1;
      idle_clocks(VS_LINES * LINE);
      vsync  = 1'b0;
      idle_clocks(TOP * LINE);
      for (int y = 0; y < IMG_H; y++) begin
        for (int b = 0; b < 2 * IMG_W; b++) begin
          href = 1'b1;
          if (b % 2 == 0)
            d = 8'(16 * int'(tex(b / 2 + SHIFT_X, y - SHIFT_Y)) + BRIGHT);
          else
            d = 8'h80;
          @(negedge pclk);
        end
        href = 1'b0;
        d    = 8'h00;
        idle_clocks(HBLANK);
      end
      idle_clocks(BOT * LINE);
    end
  end
endmodule
