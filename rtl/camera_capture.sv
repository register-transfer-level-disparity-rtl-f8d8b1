// camera_capture: receives one frame from an OV7670 camera over its 8-bit
// parallel bus and turns it into a stream of luminance samples with their
// column and row.
//
// The camera is configured for QVGA YUV 4:2:2 with byte order Y U Y V, so
// every even byte of a line (counted from the start of HREF) is the
// luminance of the next pixel and the odd bytes are chroma, which is
// dropped. A frame starts when VSYNC falls after its pulse; a line is the
// time HREF is high. Bus signals are sampled on the rising edge of PCLK.
//
// Capture is on demand, with a four-phase handshake towards the system
// clock domain: when `capture_req` (synchronised here) is seen high, the
// block waits for the next VSYNC pulse, captures exactly one frame of
// IMG_H lines of IMG_W pixels, then raises `capture_ack` and holds it until
// `capture_req` falls. Frames that arrive while not armed are ignored, so a
// stored frame is never overwritten while the disparity stage reads it.
//
// Outputs are registered: `pix_valid` pulses (at most every second PCLK)
// with `pix_y`, `pix_x` and `pix_row` one PCLK after the luminance byte.
// The bus timing and the YUV byte order are this implementation's
// reading of the camera; the frame size is the design's 320 x 240.
module camera_capture #(
  parameter int unsigned IMG_W = 320,
  parameter int unsigned IMG_H = 240,
  localparam int unsigned XW   = $clog2(IMG_W),
  localparam int unsigned YW   = $clog2(IMG_H + 1)
) (
  input  logic          pclk,
  input  logic          rst_n,        // synchronous to pclk release
  // OV7670 output bus
  input  logic          vsync,
  input  logic          href,
  input  logic [7:0]    d,
  // handshake with the frame sequencer (other clock domain)
  input  logic          capture_req,
  output logic          capture_ack,
  // pixel stream
  output logic          pix_valid,
  output logic [7:0]    pix_y,
  output logic [XW-1:0] pix_x,
  output logic [YW-1:0] pix_row,
  output logic          capturing
);
  typedef enum logic [2:0] {
    S_IDLE, S_ARMED, S_VSYNC, S_CAPTURE, S_DONE
  } state_t;

  state_t          state;
  logic            req_s;
  logic            href_q;
  logic            byte_odd;   // 0: next byte is Y, 1: next byte is chroma
  logic [XW:0]     x;
  logic [YW-1:0]   y;

  sync_2ff u_req_sync (.clk(pclk), .rst_n(rst_n), .d(capture_req), .q(req_s));

  assign capturing = (state == S_CAPTURE);

  always_ff @(posedge pclk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      capture_ack <= 1'b0;
      href_q      <= 1'b0;
      byte_odd    <= 1'b0;
      x           <= '0;
      y           <= '0;
      pix_valid   <= 1'b0;
      pix_y       <= '0;
      pix_x       <= '0;
      pix_row     <= '0;
    end else begin
      pix_valid <= 1'b0;
      href_q    <= href;
      unique case (state)
        S_IDLE: begin
          capture_ack <= 1'b0;
          if (req_s) state <= S_ARMED;
        end
        S_ARMED:
          if (vsync) state <= S_VSYNC;
        S_VSYNC:
          if (!vsync) begin
            state    <= S_CAPTURE;
            x        <= '0;
            y        <= '0;
            byte_odd <= 1'b0;
          end
        S_CAPTURE: begin
          if (vsync || y == YW'(IMG_H)) begin
            state       <= S_DONE;
            capture_ack <= 1'b1;
          end else if (href) begin
            byte_odd <= ~byte_odd;
            if (!byte_odd && x < (XW+1)'(IMG_W)) begin
              pix_valid <= 1'b1;
              pix_y     <= d;
              pix_x     <= x[XW-1:0];
              pix_row   <= y;
              x         <= x + 1'b1;
            end
          end else if (href_q) begin
            // end of a line
            y        <= y + 1'b1;
            x        <= '0;
            byte_odd <= 1'b0;
          end
        end
        S_DONE:
          if (!req_s) begin
            state       <= S_IDLE;
            capture_ack <= 1'b0;
          end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
