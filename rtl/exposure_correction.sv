// exposure_correction: evens out the brightness of one camera against the
// other before the images are compared.
//
// Each luminance sample gets a signed offset added (`offset`, two's
// complement, range -256..+255), the sum is clamped to 0..255, and the top
// PIX_W bits are kept as the stored pixel (the buffers hold 4-bit pixels).
// `out_sat` marks a sample that was clamped. The column and row travel
// alongside. One register stage: outputs follow inputs by one clock.
// The pipeline position and the 4-bit result follow the design; the
// additive form of the correction is this implementation's choice.
module exposure_correction #(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned PIX_W = 4,
  parameter int unsigned XW    = 9,
  parameter int unsigned YW    = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [IN_W:0] offset,
  input  logic               in_valid,
  input  logic [IN_W-1:0]    in_y,
  input  logic [XW-1:0]      in_x,
  input  logic [YW-1:0]      in_row,
  output logic               out_valid,
  output logic [PIX_W-1:0]   out_pix,
  output logic [XW-1:0]      out_x,
  output logic [YW-1:0]      out_row,
  output logic               out_sat
);
  localparam logic signed [IN_W+1:0] MAXV = (IN_W+2)'((1 << IN_W) - 1);

  logic signed [IN_W+1:0] sum;
  logic [IN_W-1:0]        clamped;
  logic                   sat;

  always_comb begin
    sum = $signed({2'b00, in_y}) + $signed({offset[IN_W], offset});
    sat = 1'b0;
    if (sum < 0) begin
      clamped = '0;
      sat     = 1'b1;
    end else if (sum > MAXV) begin
      clamped = '1;
      sat     = 1'b1;
    end else begin
      clamped = sum[IN_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_x     <= '0;
      out_row   <= '0;
      out_sat   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_pix   <= clamped[IN_W-1 -: PIX_W];
      out_x     <= in_x;
      out_row   <= in_row;
      out_sat   <= in_valid && sat;
    end
  end
endmodule
