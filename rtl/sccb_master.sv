// sccb_master: write-only SCCB (I2C-compatible) master for one three-phase
// register write: device ID, register address, data.
//
// A write is a start condition, 27 bit slots (three bytes, each followed by
// the 9th "don't care" slot in which SIO_D is released), and a stop
// condition, 114 steps of QDIV clocks each. Data changes while SIO_C is low;
// each bit slot is four steps: low, low, high, high. `start` is taken
// while `busy` is low; `done` pulses for one clock at the end. The data pin
// is open-drain style: `siod_oe` high drives `siod_o`, low releases the
// line (pull-up on the board). With the default QDIV of 125 at 50 MHz,
// SIO_C runs at 100 kHz. The bus protocol is the camera's; the step
// sequencing is this implementation's.
module sccb_master #(
  parameter int unsigned QDIV = 125   // clocks per quarter SIO_C period
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] id,
  input  logic [7:0] addr,
  input  logic [7:0] data,
  output logic       busy,
  output logic       done,
  output logic       sioc,
  output logic       siod_o,
  output logic       siod_oe
);
  localparam int unsigned NSTEP = 3 + 27 * 4 + 3;  // start, bits, stop
  localparam int unsigned CW    = (QDIV > 1) ? $clog2(QDIV) : 1;

  logic [26:0] bits;
  logic [6:0]  step;
  logic [CW-1:0] cnt;

  // bus levels for a given step
  function automatic logic [2:0] step_levels(input logic [6:0] s, input logic [26:0] b);
    // returns {sioc, siod_o, siod_oe}
    int unsigned k, q;
    if (s == 0)      return 3'b111;
    else if (s == 1) return 3'b101;
    else if (s == 2) return 3'b001;
    else if (32'(s) < 3 + 27 * 4) begin
      k = (32'(s) - 3) / 4;
      q = (32'(s) - 3) % 4;
      return {(q == 1 || q == 2), b[26 - k], !(k == 8 || k == 17 || k == 26)};
    end
    else if (32'(s) == NSTEP - 3) return 3'b001;
    else if (32'(s) == NSTEP - 2) return 3'b101;
    else                          return 3'b111;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      bits    <= '0;
      step    <= '0;
      cnt     <= '0;
      sioc    <= 1'b1;
      siod_o  <= 1'b1;
      siod_oe <= 1'b1;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        sioc    <= 1'b1;
        siod_o  <= 1'b1;
        siod_oe <= 1'b1;
        if (start) begin
          busy <= 1'b1;
          bits <= {id, 1'b1, addr, 1'b1, data, 1'b1};
          step <= '0;
          cnt  <= '0;
        end
      end else begin
        {sioc, siod_o, siod_oe} <= step_levels(step, bits);
        if (32'(cnt) == QDIV - 1) begin
          cnt <= '0;
          if (32'(step) == NSTEP - 1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            step <= step + 1'b1;
          end
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
