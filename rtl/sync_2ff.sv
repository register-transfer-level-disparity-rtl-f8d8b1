// sync_2ff: two-flop synchroniser for a single level signal crossing into
// the clock domain of `clk`. Output follows `d` two to three `clk` edges
// later. Only quasi-static levels and four-phase handshake signals are
// passed through it in this design.
module sync_2ff #(
  parameter logic RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
