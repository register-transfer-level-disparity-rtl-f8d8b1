// vertical_offset_correction: removes a vertical misalignment between the
// two cameras by moving one image up or down by whole rows as it is
// written into its frame buffer.
//
// A pixel from camera row `in_row` is written to buffer row
// in_row + `voffset` (signed). Pixels whose corrected row falls outside
// 0..IMG_H-1 are not written (`dropped` pulses instead), so the rows the
// shift uncovers keep older contents. The buffer address is
// row * IMG_W + column. One register stage: `we`, `waddr` and `wdata`
// follow the input by one clock. The correction itself is named by the
// design; doing it as a write-address offset is this implementation's choice.
module vertical_offset_correction #(
  parameter int unsigned IMG_W = 320,
  parameter int unsigned IMG_H = 240,
  parameter int unsigned PIX_W = 4,
  localparam int unsigned XW   = $clog2(IMG_W),
  localparam int unsigned YW   = $clog2(IMG_H + 1),
  localparam int unsigned AW   = $clog2(IMG_W * IMG_H)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [YW:0]  voffset,
  input  logic                in_valid,
  input  logic [PIX_W-1:0]    in_pix,
  input  logic [XW-1:0]       in_x,
  input  logic [YW-1:0]       in_row,
  output logic                we,
  output logic [AW-1:0]       waddr,
  output logic [PIX_W-1:0]    wdata,
  output logic                dropped
);
  logic signed [YW+1:0] row_c;
  logic                 in_frame;

  always_comb begin
    row_c  = $signed({2'b00, in_row}) + $signed({voffset[YW], voffset});
    in_frame = (row_c >= 0) && (row_c < (YW+2)'(IMG_H));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      we      <= 1'b0;
      waddr   <= '0;
      wdata   <= '0;
      dropped <= 1'b0;
    end else begin
      we      <= in_valid && in_frame;
      dropped <= in_valid && !in_frame;
      waddr   <= AW'(32'(row_c[YW:0]) * IMG_W + 32'(in_x));
      wdata   <= in_pix;
    end
  end
endmodule
