// sram_model: behavioural model of the four 512Kx8 asynchronous SRAMs used
// as one 512Kx32 memory (testbench use only).
//
// Active-low ce and oe, r_w high = read. While ce and r_w are low the data
// bus is written at the current address (level-sensitive, as the real
// parts). Reads return mem[addr] whenever ce and oe are low, else zero.
// The model counts writes and reads and flags any access in which the
// address changes while r_w is low (a write-timing violation).
// The 512K x 32 organisation follows the documentation; the timing check
// (address held while writing) is the test's own simplification of the part.
module sram_model (
  input  logic        r_w,
  input  logic        oe,
  input  logic        ce,
  input  logic [18:0] addr,
  input  logic [31:0] dq_in,
  input  logic        dq_oe,
  output logic [31:0] dq_out
);
  logic [31:0] mem [logic [18:0]];
  int unsigned writes = 0;
  int unsigned violations = 0;
  logic [18:0] last_addr;
  logic        was_writing = 1'b0;

  always @(r_w, ce, addr, dq_in) begin
    if (!ce && !r_w) begin
      if (!dq_oe) violations++;
      if (was_writing && addr != last_addr) violations++;
      mem[addr] = dq_in;
      last_addr = addr;
      if (!was_writing) writes++;
      was_writing = 1'b1;
    end else was_writing = 1'b0;
  end

  always_comb dq_out = (!ce && !oe && mem.exists(addr)) ? mem[addr] : 32'h0;

  function automatic logic [31:0] peek(input logic [18:0] a);
    return mem.exists(a) ? mem[a] : 32'h0;
  endfunction
endmodule
