// ssd_unit: sum of squared differences between two WIN x WIN windows of
// PIX_W-bit pixels, the matching cost of the disparity search.
//
//   ssd = sum over k of (win_l[k] - win_r[k])^2,  k = 0 .. WIN*WIN-1
//
// Purely combinational: all WIN*WIN differences are squared and added in
// the same cycle. The window element order is row-major (k = row*WIN+col)
// but any order gives the same sum as long as both windows share it.
// The SSD cost follows the design; doing a whole window per cycle is this
// implementation's choice.
module ssd_unit #(
  parameter int unsigned WIN   = 5,
  parameter int unsigned PIX_W = 4,
  localparam int unsigned N     = WIN * WIN,
  localparam int unsigned SQ_W  = 2 * PIX_W,
  localparam int unsigned SSD_W = SQ_W + $clog2(N + 1)
) (
  input  logic [N-1:0][PIX_W-1:0] win_l,
  input  logic [N-1:0][PIX_W-1:0] win_r,
  output logic [SSD_W-1:0]        ssd
);
  always_comb begin
    logic [PIX_W-1:0] diff;
    logic [SQ_W-1:0]  sq;
    ssd = '0;
    for (int k = 0; k < N; k++) begin
      diff = (win_l[k] >= win_r[k]) ? (win_l[k] - win_r[k]) : (win_r[k] - win_l[k]);
      sq   = SQ_W'(diff) * SQ_W'(diff);
      ssd  = ssd + SSD_W'(sq);
    end
  end
endmodule
