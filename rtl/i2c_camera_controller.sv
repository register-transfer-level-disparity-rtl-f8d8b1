// i2c_camera_controller: brings an OV7670 camera into the mode the capture
// logic expects by writing a fixed list of register settings over the
// camera's SCCB (I2C-compatible) configuration bus.
//
// After reset, and again on a `restart` pulse, it walks the table below.
// Each entry becomes one three-phase write to device ID 0x42 through
// `sccb_master`; between writes the bus idles for GAP clocks, and after the
// soft-reset entry (COM7 = 0x80) it waits RESET_WAIT clocks for the sensor
// to come back. `cfg_done` goes high after the last write and stays high;
// `writes` counts completed register writes. The bus pins are as in
// sccb_master. Both cameras can share the bus lines: they receive the same
// settings.
//
// Settings (OV7670 register map): 0x12<-0x80 soft reset, 0x12<-0x10 QVGA
// YUV output, 0x11<-0x01 internal clock = input clock / 2, 0x3A<-0x04 and
// 0x3D<-0x88 byte order Y U Y V, 0x40<-0xC0 full 0..255 output range.
// That a controller configures the cameras over I2C follows the design;
// the register list, timing and sequencing are this implementation's.
module i2c_camera_controller
  import stereo_pkg::*;
#(
  parameter int unsigned QDIV       = 125,     // SCCB quarter period in clocks
  parameter int unsigned GAP        = 500,     // idle clocks between writes
  parameter int unsigned RESET_WAIT = 50_000   // clocks after soft reset (1 ms at 50 MHz)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       restart,
  output logic       cfg_done,
  output logic [3:0] writes,
  output logic       sioc,
  output logic       siod_o,
  output logic       siod_oe
);
  localparam int unsigned NREG = 6;
  localparam int unsigned WW   = $clog2(((RESET_WAIT > GAP) ? RESET_WAIT : GAP) + 1);

  function automatic sccb_reg_t cfg_table(input logic [2:0] i);
    unique case (i)
      3'd0:    return '{addr: 8'h12, data: 8'h80};  // COM7: soft reset
      3'd1:    return '{addr: 8'h12, data: 8'h10};  // COM7: QVGA, YUV
      3'd2:    return '{addr: 8'h11, data: 8'h01};  // CLKRC: prescale /2
      3'd3:    return '{addr: 8'h3A, data: 8'h04};  // TSLB: Y U Y V order
      3'd4:    return '{addr: 8'h3D, data: 8'h88};  // COM13: Y U Y V order
      3'd5:    return '{addr: 8'h40, data: 8'hC0};  // COM15: range 00..FF
      default: return '{addr: 8'h00, data: 8'h00};
    endcase
  endfunction

  typedef enum logic [1:0] {S_WAIT, S_ISSUE, S_BUSY, S_DONE} state_t;

  state_t        state;
  logic [2:0]    idx;
  logic [WW-1:0] wait_cnt;
  logic          wr_start, wr_busy, wr_done;
  sccb_reg_t     cur;

  assign cur      = cfg_table(idx);
  assign wr_start = (state == S_ISSUE);

  sccb_master #(.QDIV(QDIV)) u_sccb (
    .clk(clk), .rst_n(rst_n), .start(wr_start),
    .id(OV7670_WR_ID), .addr(cur.addr), .data(cur.data),
    .busy(wr_busy), .done(wr_done),
    .sioc(sioc), .siod_o(siod_o), .siod_oe(siod_oe)
  );

  // a write is only issued to an idle bus master
  a_issue_idle: assert property (@(posedge clk) disable iff (!rst_n) wr_start |-> !wr_busy);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_WAIT;
      idx      <= '0;
      wait_cnt <= WW'(GAP);
      cfg_done <= 1'b0;
      writes   <= '0;
    end else begin
      unique case (state)
        S_WAIT:
          if (wait_cnt == '0) state <= S_ISSUE;
          else                wait_cnt <= wait_cnt - 1'b1;
        S_ISSUE:
          state <= S_BUSY;
        S_BUSY:
          if (wr_done) begin
            writes <= writes + 1'b1;
            if (32'(idx) == NREG - 1) begin
              state    <= S_DONE;
              cfg_done <= 1'b1;
            end else begin
              state    <= S_WAIT;
              wait_cnt <= (cur.addr == 8'h12 && cur.data[7]) ? WW'(RESET_WAIT) : WW'(GAP);
              idx      <= idx + 1'b1;
            end
          end
        S_DONE:
          if (restart) begin
            state    <= S_WAIT;
            idx      <= '0;
            wait_cnt <= WW'(GAP);
            cfg_done <= 1'b0;
            writes   <= '0;
          end
        default: state <= S_WAIT;
      endcase
    end
  end
endmodule
