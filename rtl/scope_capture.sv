// Capture engine of the bus scope: write pointer, state flags, holdoff countdown and
// the read pointer that replays the trace oldest first.
//
// The scope moves through reset -> filling -> primed -> triggered -> stopped, kept as
// three flags rather than a state register. While not stopped, every clock with i_ce
// writes i_data to the next memory word. Once the write pointer has wrapped past the
// last word the memory holds nothing but valid samples and the engine is primed; only
// then is i_trigger (already the combination of manual and hardware triggers) heeded,
// on any clock, with or without i_ce. After the trigger a countdown loaded from
// i_holdoff counts i_ce clocks, and capture stops once i_holdoff samples have been
// recorded after the trigger clock (at least one if the trigger came on a clock
// without i_ce). For a trigger on an i_ce clock, the trigger sample thus sits at read
// position 2**LGMEM-1-i_holdoff of the stopped trace.
//
// Reading: while capture runs, the read pointer tracks the oldest word (the one the
// next write would overwrite). Once stopped, each i_rd pulse loads o_rd_data with the
// word under the pointer on the next clock and advances the pointer, so successive
// reads return the trace from oldest to newest.
//
// i_sreset (synchronous) restarts capture. The flags, pointer tracking and countdown
// follow the original scope. This implementation's own choices: the stop test is
// "counter <= 1" rather than "counter == 0" so that the number of samples after the
// trigger equals the holdoff for every holdoff value (the original keeps one more
// sample for any non-zero holdoff), and the read pointer tracks the write pointer
// plus i_ce so that it lands on the oldest word in the clock capture stops.
module scope_capture #(
  parameter int unsigned W           = 32,
  parameter int unsigned LGMEM       = 12,
  parameter int unsigned HOLDOFFBITS = 20
) (
  input  logic                   i_clk,
  input  logic                   i_sreset,
  input  logic                   i_ce,
  input  logic [W-1:0]           i_data,
  input  logic                   i_trigger,
  input  logic [HOLDOFFBITS-1:0] i_holdoff,
  input  logic                   i_rd,
  output logic                   o_primed,
  output logic                   o_triggered,
  output logic                   o_stopped,
  output logic [W-1:0]           o_rd_data
);

  logic [LGMEM-1:0]       wr_addr, rd_addr;
  logic [HOLDOFFBITS-1:0] counter;
  logic                   primed, triggered, stopped;
  logic                   write;

  assign write = !stopped && i_ce;

  always_ff @(posedge i_clk)
    if (i_sreset)
      wr_addr <= '0;
    else if (write)
      wr_addr <= wr_addr + 1'b1;

  // Memory is full once the last word has been written
  always_ff @(posedge i_clk)
    if (i_sreset)
      primed <= 1'b0;
    else if (i_ce && !primed)
      primed <= &wr_addr;

  // Only a reset clears a trigger
  always_ff @(posedge i_clk)
    if (i_sreset)
      triggered <= 1'b0;
    else if (primed && !triggered)
      triggered <= i_trigger;

  always_ff @(posedge i_clk)
    if (i_sreset || !triggered)
      counter <= i_holdoff;
    else if (i_ce && counter != '0)
      counter <= counter - 1'b1;

  always_ff @(posedge i_clk)
    if (i_sreset || !primed)
      stopped <= 1'b0;
    else if (i_ce && !stopped) begin
      if (i_trigger && i_holdoff == '0)
        stopped <= 1'b1;          // stop on the trigger sample itself
      if (triggered && counter <= HOLDOFFBITS'(1))
        stopped <= 1'b1;          // countdown complete
    end

  // Read pointer: the oldest word while running, then one step per read
  always_ff @(posedge i_clk)
    if (!stopped)
      rd_addr <= wr_addr + LGMEM'(i_ce);
    else if (i_rd)
      rd_addr <= rd_addr + 1'b1;

  scope_mem #(.W(W), .LGMEM(LGMEM)) u_mem (
    .i_clk   (i_clk),
    .i_we    (write),
    .i_waddr (wr_addr),
    .i_wdata (i_data),
    .i_re    (i_rd),
    .i_raddr (rd_addr),
    .o_rdata (o_rd_data)
  );

  assign o_primed    = primed;
  assign o_triggered = triggered;
  assign o_stopped   = stopped;

  // Legal flag combinations: {stopped, triggered, primed} in 000, 001, 011, 111,
  // and a stopped, triggered scope has finished its countdown.
  a_flags: assert property (@(posedge i_clk) disable iff (i_sreset)
      (!triggered || primed) && (!stopped || triggered));
  a_count: assert property (@(posedge i_clk) disable iff (i_sreset)
      !(stopped && triggered) || counter == '0);

endmodule
