// Trace memory of the bus scope.
//
// A plain simple-dual-port RAM of 2**LGMEM words, W bits each, meant to map onto FPGA
// block RAM. The write port stores i_wdata at i_waddr on any clock with i_we set. The
// read port is registered: with i_re set, o_rdata holds mem[i_raddr] from the next
// clock on and keeps it until the next read. The memory has no reset, which is why the
// capture logic must fill every word before a trace counts as valid. A read and a write
// of the same address on one clock return the old word.
//
// The array and its registered read follow the original scope; splitting the memory
// into its own module is this implementation's choice.
module scope_mem #(
  parameter int unsigned W     = 32,
  parameter int unsigned LGMEM = 12
) (
  input  logic             i_clk,
  input  logic             i_we,
  input  logic [LGMEM-1:0] i_waddr,
  input  logic [W-1:0]     i_wdata,
  input  logic             i_re,
  input  logic [LGMEM-1:0] i_raddr,
  output logic [W-1:0]     o_rdata
);

  logic [W-1:0] mem [0:(1<<LGMEM)-1];

  always_ff @(posedge i_clk)
    if (i_we)
      mem[i_waddr] <= i_wdata;

  always_ff @(posedge i_clk)
    if (i_re)
      o_rdata <= mem[i_raddr];

endmodule
