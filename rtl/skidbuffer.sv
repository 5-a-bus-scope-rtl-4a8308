// Skid buffer for one valid/ready channel.
//
// Breaks the combinational path from the downstream ready back to the upstream ready:
// o_ready is a register. When the downstream stalls while a word is arriving, that
// word is parked in a one-entry buffer and o_ready drops; the parked word is offered
// downstream first. Words pass straight through (no added latency) when nothing is
// parked. Handshake: a word moves when valid and ready are both high; o_valid and
// o_data stay steady while o_valid is high and i_ready is low.
//
// Skid buffers on the AXI-Lite request channels are named by the scope's AXI-Lite
// port; their construction here is a standard one chosen by this implementation.
module skidbuffer #(
  parameter int unsigned DW = 32
) (
  input  logic          i_clk,
  input  logic          i_reset,
  input  logic          i_valid,
  output logic          o_ready,
  input  logic [DW-1:0] i_data,
  output logic          o_valid,
  input  logic          i_ready,
  output logic [DW-1:0] o_data
);

  logic          r_valid;
  logic [DW-1:0] r_data;

  always_ff @(posedge i_clk)
    if (i_reset)
      r_valid <= 1'b0;
    else if (i_valid && o_ready && o_valid && !i_ready)
      r_valid <= 1'b1;                   // downstream stalled: park the word
    else if (i_ready)
      r_valid <= 1'b0;

  always_ff @(posedge i_clk)
    if (o_ready)
      r_data <= i_data;

  assign o_ready = !r_valid;
  assign o_valid = r_valid || i_valid;
  assign o_data  = r_valid ? r_data : i_data;

  a_hold: assert property (@(posedge i_clk) disable iff (i_reset)
      o_valid && !i_ready |=> o_valid && $stable(o_data));

endmodule
