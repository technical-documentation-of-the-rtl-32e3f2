// dpram: simple dual-port RAM with independent write and read clocks.
//
// One write port (we/waddr/wdata on wclk) and one read port (re/raddr on
// rclk) with a registered read: rdata shows mem[raddr] on the rclk edge after
// re is high and holds until the next read. Used for the capture buffer, the
// UDP packet buffer and the receive buffer, which the design describes as
// dual-port FPGA block RAM between two clock domains.
// The dual-port memories follow the documentation; the registered read and
// the single-port-per-side structure are this design's own choice.
module dpram #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rclk,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wclk)
    if (we) mem[waddr] <= wdata;

  always_ff @(posedge rclk)
    if (re) rdata <= mem[raddr];
endmodule
