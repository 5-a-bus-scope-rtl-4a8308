// Self-checking test of scope_core, the protocol-independent register logic, with a
// 16-word memory and a 12-bit holdoff.
//
// Drives the generic write and read strobes directly and checks, clock by clock: the
// read data is ready one clock after the read strobe; the control word packs reset,
// stopped, triggered, primed, manual, disabled, zero, LGMEM and holdoff in that order;
// the internal reset follows every control write unless byte 3 is written with bit 31
// set, and lasts one clock; the holdoff is written lane by lane and truncated to its
// width; the manual trigger sets on bit 27 and clears on reset; the disable bit
// follows bit 26 of any byte-3 write and masks i_trigger; writes to the data address
// change nothing; data reads return the live probe word before the stop and the trace
// after it; the interrupt is the stopped flag.
module tb_scope_core;
  import busscope_pkg::*;
  localparam int LGMEM = 4, N = 1 << LGMEM, HB = 12;
  logic        clk = 0, reset = 1;
  logic        wr = 0, rd = 0, wr_addr = 0, rd_addr = 0;
  logic [31:0] wdata = '0, rnext;
  logic [3:0]  sel = '0;
  logic        ce = 0, trig = 0, irq;
  logic [31:0] data = '0;
  int checks = 0, failures = 0;

  scope_core #(.W(32), .LGMEM(LGMEM), .HOLDOFFBITS(HB)) dut (
    .i_clk(clk), .i_reset(reset), .i_wr(wr), .i_rd(rd), .i_wr_addr(wr_addr),
    .i_rd_addr(rd_addr), .i_wdata(wdata), .i_sel(sel), .o_rdata_next(rnext),
    .i_ce(ce), .i_trigger(trig), .i_data(data), .o_interrupt(irq));

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (ce) data <= data + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input logic a, input logic [31:0] d, input logic [3:0] s);
    wr = 1; wr_addr = a; wdata = d; sel = s;
    @(posedge clk); #1;
    wr = 0;
  endtask

  // returns the word the bus would see; o_rdata_next is valid one clock after rd
  task automatic read(input logic a, output logic [31:0] d);
    rd = 1; rd_addr = a;
    @(posedge clk); #1;
    rd = 0;
    d = rnext;
  endtask

  function automatic logic [31:0] ctrl(input bit rst, stp, trg, prm, man, dis,
                                       input int holdoff);
    return {rst, stp, trg, prm, man, dis, 1'b0, 5'(LGMEM), 20'(holdoff)};
  endfunction

  initial begin
    logic [31:0] d;
    repeat (2) @(posedge clk); #1;
    reset = 0;
    read(ADDR_CONTROL, d);
    check(d == ctrl(0, 0, 0, 0, 0, 0, 12), $sformatf("after bus reset: %h", d));
    // a write with byte 3 unselected resets, and the reset lasts one clock: the
    // reset flag shows on the control word only in the clock right after the write
    write(ADDR_CONTROL, 32'hffff_f123, 4'b0111);
    check(rnext == ctrl(1, 0, 0, 0, 0, 0, 12'h123), $sformatf("reset flag visible: %h", rnext));
    read(ADDR_CONTROL, d);
    check(d == ctrl(0, 0, 0, 0, 0, 0, 12'h123), $sformatf("reset lasts one clock, lanes 0-2: %h", d));
    // byte 3 with bit 31 set: no reset, disable follows bit 26
    write(ADDR_CONTROL, 32'h8400_0045, 4'b1001);
    read(ADDR_CONTROL, d);
    check(d == ctrl(0, 0, 0, 0, 0, 1, 12'h145), $sformatf("no reset, disabled: %h", d));
    // a write to the data address changes nothing
    write(ADDR_DATA, 32'h0000_0000, 4'hf);
    read(ADDR_CONTROL, d);
    check(d == ctrl(0, 0, 0, 0, 0, 1, 12'h145), $sformatf("data write ignored: %h", d));
    // reset with holdoff 2, trigger enabled
    write(ADDR_CONTROL, 32'h0000_0002, 4'hf);
    // live reads before the stop
    ce = 1;
    for (int i = 0; i < N + 2; i++) begin
      logic [31:0] exp;
      rd = 1; rd_addr = ADDR_DATA;
      @(posedge clk); #1;
      rd = 0;
      exp = data;                 // probe word during the clock after the request
      check(rnext == exp, $sformatf("live read %0d: %0d vs %0d", i, rnext, exp));
    end
    ce = 0;
    read(ADDR_CONTROL, d);
    check(d == ctrl(0, 0, 0, 1, 0, 0, 2), $sformatf("primed: %h", d));
    // manual trigger without reset: bit 27 with bit 31
    write(ADDR_CONTROL, 32'h8800_0002, 4'b1000);
    read(ADDR_CONTROL, d);
    check(d == ctrl(0, 0, 1, 1, 1, 0, 2), $sformatf("manual trigger, triggered: %h", d));
    check(!irq, "no interrupt before the stop");
    ce = 1; @(posedge clk); #1; ce = 0;
    read(ADDR_CONTROL, d);
    check(d[BIT_STOPPED] == 1'b0, "one sample short of the holdoff");
    ce = 1; @(posedge clk); #1; ce = 0;
    read(ADDR_CONTROL, d);
    check(d == ctrl(0, 1, 1, 1, 1, 0, 2), $sformatf("stopped: %h", d));
    check(irq, "interrupt while stopped");
    // trace: last sample is data-1
    for (int k = 0; k < N; k++) begin
      read(ADDR_DATA, d);
      check(d == data - N + k, $sformatf("trace word %0d: %0d vs %0d", k, d, data - N + k));
    end
    // reset clears the manual trigger; disabled hardware trigger is masked
    write(ADDR_CONTROL, 32'h0400_0000, 4'hf);
    read(ADDR_CONTROL, d);
    check(d == ctrl(0, 0, 0, 0, 0, 1, 0), $sformatf("reset clears manual: %h", d));
    ce = 1; repeat (N + 1) @(posedge clk); #1; ce = 0;
    trig = 1; repeat (3) @(posedge clk); #1; trig = 0;
    read(ADDR_CONTROL, d);
    check(d == ctrl(0, 0, 0, 1, 0, 1, 0), $sformatf("disabled trigger masked: %h", d));
    write(ADDR_CONTROL, 32'h8000_0000, 4'b1000);          // enable, no reset
    trig = 1; ce = 1; @(posedge clk); #1; trig = 0; ce = 0;
    read(ADDR_CONTROL, d);
    check(d == ctrl(0, 1, 1, 1, 0, 0, 0), $sformatf("hardware trigger, holdoff 0: %h", d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
