// disparity_generator: block-wise SSD stereo matcher. For every pixel of
// the left image it finds the horizontal shift d (0..MAX_DISP-1) at which a
// WIN x WIN window of the right image, taken d columns further left, matches
// the left window best, measured by the sum of squared differences (SSD),
// and emits that disparity as a grey level.
//
// Block-wise caching: the frames stay in the stereo block RAMs; this block
// keeps only a band of WIN rows of each image in two small caches (left and
// right, WIN x IMG_W pixels each), used as circular row stores. Each image
// row is read from the block RAMs exactly once, in raster order, just
// before the first output row whose window needs it, so the caches are the
// only copy the matcher reads. Those loaded pixel pairs are also offered on
// the `tap_*` outputs (used to build the debug average image).
//
// Operation after `start`: for each output row y, first load row y+H
// (H = (WIN-1)/2) if it exists (IMG_W cycles plus one), then visit x = 0 ..
// IMG_W-1. A pixel whose window would leave the image (within H of an
// edge) gets disparity 0 in one cycle. Otherwise one candidate d is
// evaluated per cycle, starting at 0, and the search stops after
// d = MAX_DISP-1 or at the last d for which the right window is still
// inside the image (x-d-H >= 0), i.e. min(MAX_DISP, x-H+1) cycles. The
// smallest SSD wins; on a tie the smaller d wins. Output
// `out_disp` = d * (2^DISP_W / MAX_DISP), one pixel per visit, in raster
// order, `out_sof` on pixel (0,0). `done` pulses one clock after the last
// pixel; `busy` is high in between. At 320 x 240, WIN 5, MAX_DISP 32 a
// frame takes 2,348,880 clocks.
//
// Block RAM port: `rd_addr` (row*IMG_W + column) is presented, `rd_l` and
// `rd_r` must carry that pixel pair one clock later.
//
// The SSD cost, the block-wise caching and the 4-bit/8-bit pixel widths
// follow the design. The window size, search range, one-candidate-per-
// cycle schedule, border handling and grey-level scaling are this
// implementation's choices.
module disparity_generator
  import stereo_pkg::*;
#(
  parameter int unsigned IMG_W    = IMG_W_DEF,     // 320
  parameter int unsigned IMG_H    = IMG_H_DEF,     // 240
  parameter int unsigned WIN      = WIN_DEF,       // 5
  parameter int unsigned MAX_DISP = MAX_DISP_DEF,  // 32
  localparam int unsigned H       = (WIN - 1) / 2,
  localparam int unsigned AW      = $clog2(IMG_W * IMG_H),
  localparam int unsigned XW      = $clog2(IMG_W + 1),
  localparam int unsigned YW      = $clog2(IMG_H + 1),
  localparam int unsigned DW      = (MAX_DISP > 1) ? $clog2(MAX_DISP) : 1,
  localparam int unsigned SW      = (WIN > 1) ? $clog2(WIN) : 1,
  localparam int unsigned N       = WIN * WIN,
  localparam int unsigned SSD_W   = 2 * PIX_W + $clog2(N + 1),
  localparam int unsigned SCALE   = ((1 << DISP_W) / MAX_DISP > 0) ? (1 << DISP_W) / MAX_DISP : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  // block RAM read port (both images at one address)
  output logic [AW-1:0]     rd_addr,
  input  logic [PIX_W-1:0]  rd_l,
  input  logic [PIX_W-1:0]  rd_r,
  // raster-order copy of every pixel pair loaded into the caches
  output logic              tap_valid,
  output logic              tap_sof,
  output logic [PIX_W-1:0]  tap_l,
  output logic [PIX_W-1:0]  tap_r,
  // disparity stream
  output logic              out_valid,
  output logic              out_sof,
  output logic [DISP_W-1:0] out_disp
);
  typedef enum logic [1:0] {S_IDLE, S_PREP, S_LOAD, S_COMPUTE} state_t;

  state_t state;

  // row caches (circular, row r lives in slot r mod WIN)
  logic [PIX_W-1:0] cache_l [WIN][IMG_W];
  logic [PIX_W-1:0] cache_r [WIN][IMG_W];

  logic [YW-1:0]  y;        // output row
  logic [SW-1:0]  y_slot;   // y mod WIN
  logic [XW-1:0]  x;        // output column
  logic [DW-1:0]  d;        // candidate disparity
  logic [YW-1:0]  ld_row;   // next row to load
  logic [SW-1:0]  ld_slot;  // ld_row mod WIN
  logic [XW-1:0]  ld_col;
  logic [AW-1:0]  ld_addr;

  // load pipeline (block RAM latency of one clock)
  logic           ld_v;
  logic           ld_v_sof;
  logic [SW-1:0]  ld_v_slot;
  logic [XW-1:0]  ld_v_col;

  logic [SSD_W-1:0] best_ssd;
  logic [DW-1:0]    best_d;

  logic [N-1:0][PIX_W-1:0] win_l, win_r;
  logic [SSD_W-1:0]        ssd;
  logic                    pix_ok, cand_last, better;
  logic [DW-1:0]           pick_d;

  assign busy    = (state != S_IDLE);
  assign rd_addr = ld_addr;

  assign tap_valid = ld_v;
  assign tap_sof   = ld_v_sof;
  assign tap_l     = rd_l;
  assign tap_r     = rd_r;

  // window gather for the current (x, d)
  always_comb begin
    int slot, cl, cr;
    for (int j = 0; j < int'(WIN); j++) begin
      slot = (int'(y_slot) + j + int'(WIN) - int'(H)) % int'(WIN);
      for (int i = 0; i < int'(WIN); i++) begin
        cl = int'(x) - int'(H) + i;
        cr = int'(x) - int'(d) - int'(H) + i;
        if (cl < 0 || cl >= int'(IMG_W)) cl = 0;
        if (cr < 0 || cr >= int'(IMG_W)) cr = 0;
        win_l[j*WIN + i] = cache_l[slot][cl];
        win_r[j*WIN + i] = cache_r[slot][cr];
      end
    end
  end

  ssd_unit #(.WIN(WIN), .PIX_W(PIX_W)) u_ssd (.win_l(win_l), .win_r(win_r), .ssd(ssd));

  always_comb begin
    pix_ok    = (32'(y) >= H) && (32'(y) < IMG_H - H) && (32'(x) >= H) && (32'(x) < IMG_W - H);
    cand_last = (32'(d) == MAX_DISP - 1) || (32'(x) < H + 32'(d) + 1);
    better    = (d == '0) || (ssd < best_ssd);
    pick_d    = better ? d : best_d;
  end

  // cache writes
  always_ff @(posedge clk) begin
    if (ld_v) begin
      cache_l[ld_v_slot][ld_v_col] <= rd_l;
      cache_r[ld_v_slot][ld_v_col] <= rd_r;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      done      <= 1'b0;
      y         <= '0;
      y_slot    <= '0;
      x         <= '0;
      d         <= '0;
      ld_row    <= '0;
      ld_slot   <= '0;
      ld_col    <= '0;
      ld_addr   <= '0;
      ld_v      <= 1'b0;
      ld_v_sof  <= 1'b0;
      ld_v_slot <= '0;
      ld_v_col  <= '0;
      best_ssd  <= '0;
      best_d    <= '0;
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_disp  <= '0;
    end else begin
      done      <= 1'b0;
      ld_v      <= 1'b0;
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      unique case (state)
        S_IDLE:
          if (start) begin
            state   <= S_PREP;
            y       <= '0;
            y_slot  <= '0;
            ld_row  <= '0;
            ld_slot <= '0;
            ld_addr <= '0;
          end
        S_PREP:
          if (32'(ld_row) < IMG_H && 32'(ld_row) <= 32'(y) + H) begin
            state  <= S_LOAD;
            ld_col <= '0;
          end else begin
            state <= S_COMPUTE;
            x     <= '0;
            d     <= '0;
          end
        S_LOAD: begin
          ld_v      <= 1'b1;
          ld_v_sof  <= (ld_addr == '0);
          ld_v_slot <= ld_slot;
          ld_v_col  <= ld_col;
          ld_addr   <= ld_addr + 1'b1;
          ld_col    <= ld_col + 1'b1;
          if (32'(ld_col) == IMG_W - 1) begin
            state   <= S_PREP;
            ld_row  <= ld_row + 1'b1;
            ld_slot <= (32'(ld_slot) == WIN - 1) ? '0 : ld_slot + 1'b1;
          end
        end
        S_COMPUTE: begin
          logic next_pixel;
          next_pixel = 1'b0;
          if (!pix_ok) begin
            out_valid  <= 1'b1;
            out_sof    <= (x == '0) && (y == '0);
            out_disp   <= '0;
            next_pixel = 1'b1;
          end else if (cand_last) begin
            out_valid  <= 1'b1;
            out_sof    <= 1'b0;
            out_disp   <= DISP_W'(32'(pick_d) * SCALE);
            next_pixel = 1'b1;
            d          <= '0;
          end else begin
            best_ssd <= better ? ssd : best_ssd;
            best_d   <= pick_d;
            d        <= d + 1'b1;
          end
          if (next_pixel) begin
            if (32'(x) == IMG_W - 1) begin
              x <= '0;
              if (32'(y) == IMG_H - 1) begin
                state <= S_IDLE;
                done  <= 1'b1;
              end else begin
                state  <= S_PREP;
                y      <= y + 1'b1;
                y_slot <= (32'(y_slot) == WIN - 1) ? '0 : y_slot + 1'b1;
              end
            end else begin
              x <= x + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
