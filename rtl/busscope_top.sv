// Bus scope subsystem: three scope instances sharing one interrupt vector.
//
// A system usually carries more than one scope, each watching a different part of the
// design with its own trigger and probe word. This top shows the three forms of the
// scope side by side:
//   * u_scope  - the plain Wishbone scope, recording a 32-bit probe word as is;
//   * u_cscope - a Wishbone scope whose 31-bit probe passes through the run-length
//                compressor first, so that slowly changing signals fill the buffer
//                more slowly (decode: bit 31 set = repeat count, clear = sample);
//   * u_axscope- the scope behind an AXI4-Lite slave port, with the full-throughput
//                control-FIFO / data-FIFO read path.
// Each bus port is brought out as is: address decoding between slaves is left to the
// system interconnect. Each scope's "stopped" interrupt goes to a fixed position of
// o_int_vector (bits 0, 1 and 2), a wire vector of NINT entries for an interrupt
// controller; the remaining entries are zero.
//
// Timing is that of the blocks: Wishbone reads and writes are acknowledged two clocks
// after the request; the AXI-Lite port returns one read per clock when RREADY allows,
// the first two clocks after its request. All three scopes run
// on one clock; i_reset is active high (the AXI-Lite scope sees its inverse).
//
// The separate instances and the interrupt vector follow the original system
// integration; the choice of three instances, their probes and interrupt positions is
// this implementation's.
module busscope_top #(
  parameter int unsigned LGMEM       = 12,
  parameter int unsigned HOLDOFFBITS = 20,
  parameter int unsigned NINT        = 15
) (
  input  logic        i_clk,
  input  logic        i_reset,
  // Wishbone port of the plain scope
  input  logic        i_wb_cyc,
  input  logic        i_wb_stb,
  input  logic        i_wb_we,
  input  logic        i_wb_addr,
  input  logic [31:0] i_wb_data,
  input  logic [3:0]  i_wb_sel,
  output logic        o_wb_stall,
  output logic        o_wb_ack,
  output logic [31:0] o_wb_data,
  // Wishbone port of the compressed scope
  input  logic        i_cwb_cyc,
  input  logic        i_cwb_stb,
  input  logic        i_cwb_we,
  input  logic        i_cwb_addr,
  input  logic [31:0] i_cwb_data,
  input  logic [3:0]  i_cwb_sel,
  output logic        o_cwb_stall,
  output logic        o_cwb_ack,
  output logic [31:0] o_cwb_data,
  // AXI4-Lite port of the third scope
  input  logic        S_AXI_AWVALID,
  output logic        S_AXI_AWREADY,
  input  logic [2:0]  S_AXI_AWADDR,
  input  logic [2:0]  S_AXI_AWPROT,
  input  logic        S_AXI_WVALID,
  output logic        S_AXI_WREADY,
  input  logic [31:0] S_AXI_WDATA,
  input  logic [3:0]  S_AXI_WSTRB,
  output logic        S_AXI_BVALID,
  input  logic        S_AXI_BREADY,
  output logic [1:0]  S_AXI_BRESP,
  input  logic        S_AXI_ARVALID,
  output logic        S_AXI_ARREADY,
  input  logic [2:0]  S_AXI_ARADDR,
  input  logic [2:0]  S_AXI_ARPROT,
  output logic        S_AXI_RVALID,
  input  logic        S_AXI_RREADY,
  output logic [31:0] S_AXI_RDATA,
  output logic [1:0]  S_AXI_RRESP,
  // probes
  input  logic        i_ce,
  input  logic        i_trigger,
  input  logic [31:0] i_debug,
  input  logic        i_cce,
  input  logic        i_ctrigger,
  input  logic [30:0] i_cdebug,
  input  logic        i_ace,
  input  logic        i_atrigger,
  input  logic [31:0] i_adebug,
  // interrupts
  output logic [NINT-1:0] o_int_vector
);

  logic        scope_int, cscope_int, axscope_int;
  logic        rle_ce;
  logic [31:0] rle_data;

  wbscope #(.W(32), .LGMEM(LGMEM), .HOLDOFFBITS(HOLDOFFBITS)) u_scope (
    .i_clk (i_clk), .i_reset (i_reset),
    .i_wb_cyc (i_wb_cyc), .i_wb_stb (i_wb_stb), .i_wb_we (i_wb_we),
    .i_wb_addr (i_wb_addr), .i_wb_data (i_wb_data), .i_wb_sel (i_wb_sel),
    .o_wb_stall (o_wb_stall), .o_wb_ack (o_wb_ack), .o_wb_data (o_wb_data),
    .i_ce (i_ce), .i_trigger (i_trigger), .i_data (i_debug),
    .o_interrupt (scope_int)
  );

  scope_rle u_rle (
    .i_clk (i_clk), .i_reset (i_reset),
    .i_ce (i_cce), .i_data (i_cdebug),
    .o_ce (rle_ce), .o_data (rle_data)
  );

  wbscope #(.W(32), .LGMEM(LGMEM), .HOLDOFFBITS(HOLDOFFBITS)) u_cscope (
    .i_clk (i_clk), .i_reset (i_reset),
    .i_wb_cyc (i_cwb_cyc), .i_wb_stb (i_cwb_stb), .i_wb_we (i_cwb_we),
    .i_wb_addr (i_cwb_addr), .i_wb_data (i_cwb_data), .i_wb_sel (i_cwb_sel),
    .o_wb_stall (o_cwb_stall), .o_wb_ack (o_cwb_ack), .o_wb_data (o_cwb_data),
    .i_ce (rle_ce), .i_trigger (i_ctrigger), .i_data (rle_data),
    .o_interrupt (cscope_int)
  );

  axilscope #(.W(32), .LGMEM(LGMEM), .HOLDOFFBITS(HOLDOFFBITS), .C_AXI_ADDR_WIDTH(3),
              .OPT_DOUBLE_FIFO(1'b1), .LGFIFO(2)) u_axscope (
    .S_AXI_ACLK (i_clk), .S_AXI_ARESETN (!i_reset),
    .S_AXI_AWVALID, .S_AXI_AWREADY, .S_AXI_AWADDR, .S_AXI_AWPROT,
    .S_AXI_WVALID, .S_AXI_WREADY, .S_AXI_WDATA, .S_AXI_WSTRB,
    .S_AXI_BVALID, .S_AXI_BREADY, .S_AXI_BRESP,
    .S_AXI_ARVALID, .S_AXI_ARREADY, .S_AXI_ARADDR, .S_AXI_ARPROT,
    .S_AXI_RVALID, .S_AXI_RREADY, .S_AXI_RDATA, .S_AXI_RRESP,
    .i_ce (i_ace), .i_trigger (i_atrigger), .i_data (i_adebug),
    .o_interrupt (axscope_int)
  );

  always_comb begin
    o_int_vector    = '0;
    o_int_vector[0] = scope_int;
    o_int_vector[1] = cscope_int;
    o_int_vector[2] = axscope_int;
  end

endmodule
