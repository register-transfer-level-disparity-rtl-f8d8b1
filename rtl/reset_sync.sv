// reset_sync: turns the board's asynchronous active-low reset into a reset
// for one clock domain that asserts at once and releases on the second
// rising edge of `clk` after `rst_n_in` goes high.
module reset_sync (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);
  logic r1;

  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) begin
      r1        <= 1'b0;
      rst_n_out <= 1'b0;
    end else begin
      r1        <= 1'b1;
      rst_n_out <= r1;
    end
  end
endmodule
