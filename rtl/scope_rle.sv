// Run-length compressor for a scope probe.
//
// Long traces of slowly changing signals waste scope memory. This stage turns a stream
// of 31-bit samples (i_data, valid on clocks with i_ce) into 32-bit scope words:
//   bit 31 = 0: bits 30:0 carry a new sample;
//   bit 31 = 1: the previous sample was repeated 1 + bits 30:0 more times.
// A sample equal to its predecessor produces no word; it only counts. When a different
// sample arrives the pending run (if any) is emitted as a repeat word, followed by the
// new sample. A run that reaches 2**31-1 repeats is closed, and the next equal sample
// starts over as a new sample word.
//
// Output timing: o_ce marks clocks carrying a word in o_data. A run that ends makes
// two words at once; the second is held in a one-word buffer and sent on the next
// clock. Because a repeated sample produces nothing, the buffer is always drained
// before it could be needed twice, even with i_ce on every clock. The first sample
// after reset is always emitted. A run still open when the consumer stops listening
// is not emitted.
//
// The code (flag in bit 31, count of extra repeats minus one) follows the original
// description of scope compression; the pipeline and buffering are this
// implementation's own.
module scope_rle
  import busscope_pkg::*;
(
  input  logic        i_clk,
  input  logic        i_reset,
  input  logic        i_ce,
  input  logic [30:0] i_data,
  output logic        o_ce,
  output logic [31:0] o_data
);

  logic        have_last;
  logic [30:0] last;
  logic [30:0] run;            // repeats of last seen so far
  logic        pend_valid;
  logic [31:0] pend;
  logic        repeat_in;
  logic        close_run;
  logic [1:0]  n_new;          // words made this clock
  logic [31:0] w0, w1;         // words made this clock, in order

  assign repeat_in = have_last && (i_data == last) && (run != '1);
  assign close_run = i_ce && !repeat_in && (run != '0);

  always_comb begin
    w0    = {1'b0, i_data};
    w1    = {1'b0, i_data};
    n_new = 2'd0;
    if (i_ce && !repeat_in) begin
      if (close_run) begin
        w0    = {1'b1, run - 1'b1};
        n_new = 2'd2;
      end else
        n_new = 2'd1;
    end
  end

  always_ff @(posedge i_clk)
    if (i_reset) begin
      have_last <= 1'b0;
      run       <= '0;
    end else if (i_ce) begin
      have_last <= 1'b1;
      last      <= i_data;
      run       <= repeat_in ? run + 1'b1 : '0;
    end

  // One word leaves per clock; the rest waits in the one-word buffer.
  always_ff @(posedge i_clk)
    if (i_reset) begin
      o_ce       <= 1'b0;
      pend_valid <= 1'b0;
    end else begin
      o_ce <= pend_valid || (n_new != 2'd0);
      if (pend_valid) begin
        o_data     <= pend;
        pend_valid <= (n_new != 2'd0);
        pend       <= w0;
      end else begin
        o_data     <= w0;
        pend_valid <= (n_new == 2'd2);
        pend       <= w1;
      end
    end

  a_no_overflow: assert property (@(posedge i_clk) disable iff (i_reset)
      !(pend_valid && n_new == 2'd2));

  a_flag: assert property (@(posedge i_clk) disable iff (i_reset)
      pend_valid |-> !pend[RLE_FLAG]);

endmodule
