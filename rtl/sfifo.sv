// Synchronous first-in first-out buffer.
//
// 2**LGFLEN entries of DW bits in a register array. i_wr pushes i_data unless the
// FIFO is full; i_rd pops unless it is empty. o_data shows the oldest entry
// combinationally whenever o_empty is low, so a consumer can use it in the same clock
// as o_empty. A push and a pop in the same clock are both honoured unless the FIFO is
// full, when the push is dropped. o_fill counts the entries. Pushing while full or
// popping while empty is ignored and flagged by an assertion; the users of this FIFO
// never do either.
//
// Used twice in the AXI-Lite scope's full-throughput read path, as the document's
// control FIFO and data FIFO; its construction is this implementation's.
module sfifo #(
  parameter int unsigned DW     = 32,
  parameter int unsigned LGFLEN = 2
) (
  input  logic            i_clk,
  input  logic            i_reset,
  input  logic            i_wr,
  input  logic [DW-1:0]   i_data,
  output logic            o_full,
  input  logic            i_rd,
  output logic [DW-1:0]   o_data,
  output logic            o_empty,
  output logic [LGFLEN:0] o_fill
);

  logic [DW-1:0]     mem [0:(1<<LGFLEN)-1];
  logic [LGFLEN-1:0] wr_addr, rd_addr;
  logic              push, pop;

  assign push    = i_wr && !o_full;
  assign pop     = i_rd && !o_empty;
  assign o_full  = (o_fill == (LGFLEN+1)'(1 << LGFLEN));
  assign o_empty = (o_fill == '0);
  assign o_data  = mem[rd_addr];

  always_ff @(posedge i_clk)
    if (i_reset) begin
      wr_addr <= '0;
      rd_addr <= '0;
      o_fill  <= '0;
    end else begin
      if (push) wr_addr <= wr_addr + 1'b1;
      if (pop)  rd_addr <= rd_addr + 1'b1;
      case ({push, pop})
        2'b10:   o_fill <= o_fill + 1'b1;
        2'b01:   o_fill <= o_fill - 1'b1;
        default: o_fill <= o_fill;
      endcase
    end

  always_ff @(posedge i_clk)
    if (push)
      mem[wr_addr] <= i_data;

  a_no_overflow: assert property (@(posedge i_clk) disable iff (i_reset)
      !(i_wr && o_full));
  a_no_underflow: assert property (@(posedge i_clk) disable iff (i_reset)
      !(i_rd && o_empty));

endmodule
