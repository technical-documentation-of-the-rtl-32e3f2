// toggle_sync: carries single-cycle events from one clock domain to another.
//
// Each src_pulse flips a toggle flop in the source domain; the toggle is
// passed through a two-flop synchroniser in the destination domain and every
// change produces one dst_pulse, two to three destination cycles later.
// Events must be spaced by at least three destination-clock cycles.
// The flops have no reset because the two domains are reset at different
// times; their power-up value 0 (declaration initialisers, loaded by FPGA
// configuration) keeps a false event from appearing at start-up. A linter
// notes initialised variables that a process also writes; that is intended.
// The circuit is this design's own choice.
module toggle_sync (
  input  logic src_clk,
  input  logic src_pulse,
  input  logic dst_clk,
  output logic dst_pulse
);
  logic tog = 1'b0;
  logic [2:0] sync = 3'b000;

  always_ff @(posedge src_clk)
    if (src_pulse) tog <= ~tog;

  always_ff @(posedge dst_clk)
    sync <= {sync[1:0], tog};

  assign dst_pulse = sync[2] ^ sync[1];
endmodule
