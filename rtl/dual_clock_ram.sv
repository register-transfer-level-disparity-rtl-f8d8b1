// dual_clock_ram: simple dual-port block RAM with independent write and
// read clocks, the shape a Xilinx block RAM takes when inferred.
// Write: `wdata` is stored at `waddr` on a rising `wclk` edge with `we` high.
// Read: `rdata` shows the word at `raddr` one `rclk` edge after the address
// (registered output, one cycle of latency). Contents are not initialised.
module dual_clock_ram #(
  parameter int unsigned WIDTH = 4,
  parameter int unsigned DEPTH = 320 * 240,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rclk,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    rdata <= (32'(raddr) < DEPTH) ? mem[raddr] : '0;
  end
endmodule
