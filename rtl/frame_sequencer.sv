// frame_sequencer: runs the pipeline frame by frame in the disparity clock
// domain. Once the cameras are configured (`cfg_done`, synchronised here)
// it asks both capture blocks for one frame each (`capture_req`), waits
// until both acknowledge (`ack_l`, `ack_r`, synchronised here), completes
// the four-phase handshake, then starts the disparity generator and waits
// for it to finish before asking for the next stereo pair. Capture and
// matching therefore never touch the frame buffers at the same time, which
// lets one set of buffers serve without double buffering.
// `pairs` counts stereo pairs captured. This sequencing is this
// implementation's own; the design only fixes the order of the stages.
module frame_sequencer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_done,     // from the configuration clock domain
  input  logic        ack_l,        // from the left pixel clock domain
  input  logic        ack_r,        // from the right pixel clock domain
  output logic        capture_req,
  output logic        disp_start,
  input  logic        disp_done,
  output logic [15:0] pairs
);
  typedef enum logic [2:0] {S_CFG, S_REQ, S_REL, S_START, S_RUN} state_t;

  state_t state;
  logic   cfg_s, ack_l_s, ack_r_s;

  sync_2ff u_cfg  (.clk(clk), .rst_n(rst_n), .d(cfg_done), .q(cfg_s));
  sync_2ff u_ackl (.clk(clk), .rst_n(rst_n), .d(ack_l),    .q(ack_l_s));
  sync_2ff u_ackr (.clk(clk), .rst_n(rst_n), .d(ack_r),    .q(ack_r_s));

  assign capture_req = (state == S_REQ);
  assign disp_start  = (state == S_START);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_CFG;
      pairs <= '0;
    end else begin
      unique case (state)
        S_CFG:   if (cfg_s) state <= S_REQ;
        S_REQ:   if (ack_l_s && ack_r_s) state <= S_REL;
        S_REL:   if (!ack_l_s && !ack_r_s) begin
                   state <= S_START;
                   pairs <= pairs + 1'b1;
                 end
        S_START: state <= S_RUN;
        S_RUN:   if (disp_done) state <= S_REQ;
        default: state <= S_CFG;
      endcase
    end
  end
endmodule
