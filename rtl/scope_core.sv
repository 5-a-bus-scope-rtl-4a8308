// Register file and control of the bus scope, independent of the bus protocol.
//
// Two word registers sit behind a generic write strobe and read strobe:
//   address 0, control: write bit 31 = 1 to keep the scope running (any write with bit
//     31 clear, or with byte 3 not selected, resets the capture); bit 27 = manual
//     trigger; bit 26 = disable the hardware trigger; bits 19:0 = holdoff, one byte lane
//     at a time. Reads return {reset, stopped, triggered, primed, manual, disabled, 0,
//     LGMEM[4:0], holdoff} (see busscope_pkg::scope_ctrl_t).
//   address 1, data: each read returns the next trace word, oldest first, once capture
//     has stopped; before that it returns the live input sample.
// The trigger heeded by the capture engine is the manual trigger OR'd with i_trigger
// unless the latter is disabled.
//
// Timing: a write and a read, each with its own word address, may be presented on
// the same clock. A request (i_wr or i_rd) is taken on the clock it is presented. For a read,
// o_rdata_next is valid on the following clock (the wrapper's "pre_read" cycle) and the
// wrapper registers it into its bus data output then, so bus data appears two clocks
// after the request. Writes take effect on the clock after the request; a resetting
// write holds the internal reset for one clock.
//
// The register map, reset-on-write rule, trigger and holdoff logic follow the original
// scope. Choices of this implementation: the holdoff byte lanes are bytes 0, 1 and 2
// (bits 7:0, 15:8, 19:16); the read address is captured only with a read request; the
// holdoff resets to 2**LGMEM-4.
module scope_core
  import busscope_pkg::*;
#(
  parameter int unsigned W           = 32,
  parameter int unsigned LGMEM       = 12,
  parameter int unsigned HOLDOFFBITS = 20
) (
  input  logic          i_clk,
  input  logic          i_reset,
  // generic register port
  input  logic          i_wr,
  input  logic          i_rd,
  input  logic          i_wr_addr,
  input  logic          i_rd_addr,
  input  logic [31:0]   i_wdata,
  input  logic [3:0]    i_sel,
  output logic [31:0]   o_rdata_next,
  // probe
  input  logic          i_ce,
  input  logic          i_trigger,
  input  logic [W-1:0]  i_data,
  output logic          o_interrupt
);

  localparam logic [HOLDOFFBITS-1:0] HOLDOFF_INIT = HOLDOFFBITS'((1 << LGMEM) - 4);

  logic                   s_reset = 1'b1;
  logic                   m_trigger, r_disabled;
  logic [HOLDOFFBITS-1:0] r_holdoff;
  logic                   w_trigger;
  logic                   primed, triggered, stopped;
  logic                   r_addr;
  logic [W-1:0]           rd_data;
  logic                   ctrl_write;
  scope_ctrl_t            w_control;

  assign ctrl_write = i_wr && (i_wr_addr == ADDR_CONTROL);

  // Internal reset: on bus reset, and on every control write unless told otherwise
  always_ff @(posedge i_clk)
    if (i_reset)
      s_reset <= 1'b1;
    else if (ctrl_write)
      s_reset <= !i_sel[3] || !i_wdata[BIT_RESET];
    else
      s_reset <= 1'b0;

  always_ff @(posedge i_clk)
    if (i_reset) begin
      m_trigger  <= 1'b0;
      r_disabled <= 1'b0;
    end else begin
      if (s_reset)
        m_trigger <= 1'b0;
      if (ctrl_write && i_sel[3]) begin
        if (i_wdata[BIT_MANUAL])
          m_trigger <= 1'b1;
        r_disabled <= i_wdata[BIT_DISABLE];
      end
    end

  assign w_trigger = m_trigger || (i_trigger && !r_disabled);

  always_ff @(posedge i_clk)
    if (i_reset)
      r_holdoff <= HOLDOFF_INIT;
    else if (ctrl_write)
      for (int b = 0; b < 3; b++)
        if (i_sel[b])
          for (int k = 8*b; k < 8*b+8 && k < int'(HOLDOFFBITS); k++)
            r_holdoff[k] <= i_wdata[k];

  scope_capture #(.W(W), .LGMEM(LGMEM), .HOLDOFFBITS(HOLDOFFBITS)) u_capture (
    .i_clk       (i_clk),
    .i_sreset    (s_reset),
    .i_ce        (i_ce),
    .i_data      (i_data),
    .i_trigger   (w_trigger),
    .i_holdoff   (r_holdoff),
    .i_rd        (i_rd && i_rd_addr == ADDR_DATA),
    .o_primed    (primed),
    .o_triggered (triggered),
    .o_stopped   (stopped),
    .o_rd_data   (rd_data)
  );

  always_comb begin
    w_control           = '0;
    w_control.reset     = s_reset;
    w_control.stopped   = stopped;
    w_control.triggered = triggered;
    w_control.primed    = primed;
    w_control.manual    = m_trigger;
    w_control.disabled  = r_disabled;
    w_control.zero      = 1'b0;
    w_control.lgmem     = LGMEM[4:0];
    w_control.holdoff   = HOLDOFF_BITS'(r_holdoff);
  end

  always_ff @(posedge i_clk)
    if (i_rd)
      r_addr <= i_rd_addr;

  always_comb
    if (r_addr == ADDR_CONTROL)
      o_rdata_next = w_control;
    else if (stopped)
      o_rdata_next = 32'(rd_data);
    else
      o_rdata_next = 32'(i_data);

  assign o_interrupt = stopped;

endmodule
