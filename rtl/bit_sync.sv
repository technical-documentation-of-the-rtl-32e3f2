// bit_sync: two-flop synchroniser for a slowly changing level crossing into
// the clk domain. Output follows the input two clk edges later.
// It carries the capture block's reset among other levels, so it has no
// reset of its own: the flops start at 0 through their power-up values
// (declaration initialisers, which FPGA configuration loads). A linter
// notes initialised variables that a process also writes; that is intended.
// Synchroniser structure and power-up values are this design's own choice.
module bit_sync (
  input  logic clk,
  input  logic d,
  output logic q = 1'b0
);
  logic meta = 1'b0;
  always_ff @(posedge clk) begin
    meta <= d;
    q    <= meta;
  end
endmodule
