// Wishbone bus scope: an internal logic analyser read and controlled over a pipelined
// Wishbone (B4) slave port with two word addresses.
//
// A probe word i_data is recorded on every clock with i_ce into a circular buffer of
// 2**LGMEM words. Once the buffer is full the scope is primed and waits for a trigger:
// i_trigger (unless disabled) or a manual trigger written by the bus master. It then
// records i_holdoff more samples and stops; o_interrupt is high while stopped. The
// master polls the control word (address 0) for the stopped bit and then reads the
// data word (address 1) 2**LGMEM times to get the trace, oldest sample first. The
// register map is described in scope_core.
//
// Bus timing: the port never stalls. Every request accepted on clock n (cyc & stb) is
// acknowledged on clock n+2, with o_wb_data valid alongside o_wb_ack; requests may be
// issued back to back. Dropping cyc or a bus reset (i_reset) flushes requests in flight.
//
// The two-register map, the never-stalling port and the two-stage acknowledgement
// follow the original scope. Gating requests with cyc and flushing on a dropped cyc is
// this implementation's choice; W may be narrower than the 32-bit bus, in which case
// trace words are zero-extended.
module wbscope #(
  parameter int unsigned W           = 32,
  parameter int unsigned LGMEM       = 12,
  parameter int unsigned HOLDOFFBITS = 20
) (
  input  logic          i_clk,
  input  logic          i_reset,
  // Wishbone slave
  input  logic          i_wb_cyc,
  input  logic          i_wb_stb,
  input  logic          i_wb_we,
  input  logic          i_wb_addr,
  input  logic [31:0]   i_wb_data,
  input  logic [3:0]    i_wb_sel,
  output logic          o_wb_stall,
  output logic          o_wb_ack,
  output logic [31:0]   o_wb_data,
  // probe
  input  logic          i_ce,
  input  logic          i_trigger,
  input  logic [W-1:0]  i_data,
  output logic          o_interrupt
);

  logic        req, pre_read;
  logic [31:0] rdata_next;

  assign o_wb_stall = 1'b0;
  assign req        = i_wb_cyc && i_wb_stb && !o_wb_stall;

  scope_core #(.W(W), .LGMEM(LGMEM), .HOLDOFFBITS(HOLDOFFBITS)) u_core (
    .i_clk        (i_clk),
    .i_reset      (i_reset),
    .i_wr         (req && i_wb_we),
    .i_rd         (req && !i_wb_we),
    .i_wr_addr    (i_wb_addr),
    .i_rd_addr    (i_wb_addr),
    .i_wdata      (i_wb_data),
    .i_sel        (i_wb_sel),
    .o_rdata_next (rdata_next),
    .i_ce         (i_ce),
    .i_trigger    (i_trigger),
    .i_data       (i_data),
    .o_interrupt  (o_interrupt)
  );

  always_ff @(posedge i_clk)
    if (i_reset || !i_wb_cyc)
      {o_wb_ack, pre_read} <= 2'b00;
    else
      {o_wb_ack, pre_read} <= {pre_read, req};

  always_ff @(posedge i_clk)
    o_wb_data <= rdata_next;

  // The port holds at most two requests and never acknowledges without one.
  a_ack: assert property (@(posedge i_clk) disable iff (i_reset)
      o_wb_ack |-> $past(pre_read));

endmodule
