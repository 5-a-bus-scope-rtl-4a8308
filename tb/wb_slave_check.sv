// Wishbone slave protocol monitor for the scope's fixed two-clock pipeline.
//
// Watches one pipelined Wishbone port from the bus side and checks, on every rising
// edge, the rules a bus property file would state for this slave:
//   - the slave never stalls;
//   - an acknowledgement only follows a clock on which the cycle was open;
//   - the number of outstanding requests (accepted, not yet acknowledged) never goes
//     below zero and never exceeds the two the pipeline can hold;
//   - an acknowledgement comes exactly when a request was accepted two clocks earlier
//     and the cycle was still open on the clock in between;
//   - dropping cyc abandons every outstanding request.
// The outstanding count is kept here from the bus signals alone, the counterpart of
// tying the count of outstanding transactions to the number of items in the pipeline.
// o_checks and o_violations run from reset; a testbench adds them to its own totals.
// All inputs are sampled at the rising edge, as the slave sees them.
module wb_slave_check (
  input  logic i_clk,
  input  logic i_reset,
  input  logic i_cyc,
  input  logic i_stb,
  input  logic i_stall,
  input  logic i_ack,
  output int   o_checks,
  output int   o_violations
);
  int   outstanding = 0;
  logic req_d1 = 1'b0, req_d2 = 1'b0;   // request accepted one and two clocks ago
  logic cyc_d1 = 1'b0;
  int   checks = 0, violations = 0;

  function automatic void rule(input bit ok, input string what);
    checks++;
    if (!ok) begin
      violations++;
      $display("FAIL wishbone rule at %0t: %s", $time, what);
    end
  endfunction

  always @(posedge i_clk) begin
    if (i_reset) begin
      outstanding = 0; req_d1 = 0; req_d2 = 0; cyc_d1 = 0;
    end else begin
      rule(!i_stall, "slave stalled");
      rule(!i_ack || cyc_d1, "ack after the cycle was dropped");
      rule(i_ack == req_d2,
           $sformatf("ack %0b, request two clocks ago %0b", i_ack, req_d2));
      if (!i_cyc)
        outstanding = 0;
      else
        outstanding = outstanding + int'(i_stb && !i_stall) - int'(i_ack);
      rule(outstanding >= 0 && outstanding <= 2,
           $sformatf("%0d requests outstanding", outstanding));
      req_d2 = req_d1 && i_cyc;
      req_d1 = i_cyc && i_stb && !i_stall;
      cyc_d1 = i_cyc;
    end
  end

  assign o_checks     = checks;
  assign o_violations = violations;
endmodule
