// Self-checking test of wbscope over its Wishbone port, with a 64-word memory.
//
// The probe word is a running sample number advancing on each clock with i_ce (random,
// about 70 % of clocks). The test checks: the control word after a bus reset (reset
// bit, LGMEM field, default holdoff 2**LGMEM-4); that every request is acknowledged
// exactly two clocks after it is issued, also for back-to-back reads; holdoff writes
// through individual byte lanes; that a control write resets the capture unless bit
// 31 is set; primed/triggered/stopped as seen through the control word and the
// interrupt; a hardware-triggered trace read back oldest first with the trigger
// sample holdoff words from the end; that a disabled hardware trigger is ignored; a
// manual trigger; and that data reads before the stop return the live probe word.
module tb_wbscope;
  import busscope_pkg::*;
  localparam int LGMEM = 6, N = 1 << LGMEM;
  logic        clk = 0, reset = 1;
  logic        ce = 0, trig = 0;
  logic [31:0] data = '0;
  logic        irq;
  int checks = 0, failures = 0;

  wb_bfm wb (.clk(clk));

  wbscope #(.W(32), .LGMEM(LGMEM), .HOLDOFFBITS(20)) dut (
    .i_clk(clk), .i_reset(reset),
    .i_wb_cyc(wb.cyc), .i_wb_stb(wb.stb), .i_wb_we(wb.we), .i_wb_addr(wb.addr),
    .i_wb_data(wb.wdata), .i_wb_sel(wb.sel), .o_wb_stall(wb.stall), .o_wb_ack(wb.ack),
    .o_wb_data(wb.rdata),
    .i_ce(ce), .i_trigger(trig), .i_data(data), .o_interrupt(irq));

  // bus rules checked on every clock, added to the totals at the end
  int bus_checks, bus_violations;
  wb_slave_check u_bus_check (
    .i_clk(clk), .i_reset(reset), .i_cyc(wb.cyc), .i_stb(wb.stb), .i_stall(wb.stall),
    .i_ack(wb.ack), .o_checks(bus_checks), .o_violations(bus_violations));

  always #5 clk = ~clk;

  // probe source: random ce, sample number advances after each ce clock
  bit run_probe = 0;
  always_ff @(posedge clk) if (ce) data <= data + 1;
  always @(posedge clk) begin #2; if (run_probe) ce <= ($urandom_range(99) < 70); end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ctrl_read(output scope_ctrl_t c);
    logic [31:0] d; int lat;
    wb.read(ADDR_CONTROL, d, lat);
    check(lat == 2, $sformatf("control read latency %0d", lat));
    c = d;
  endtask

  task automatic ctrl_write(input logic [31:0] d, input logic [3:0] s = 4'hf);
    int lat;
    wb.write(ADDR_CONTROL, d, s, lat);
    check(lat == 2, $sformatf("control write latency %0d", lat));
  endtask

  task automatic wait_flag(input int bitpos);
    scope_ctrl_t c; int guard = 0;
    do begin ctrl_read(c); guard++; end while (!c[bitpos] && guard < 2000);
    check(c[bitpos], $sformatf("control bit %0d rises", bitpos));
  endtask

  // read the trace and compare with the sample numbers ending at last
  task automatic check_trace(input int last, input string what);
    logic [31:0] q[$]; int bad;
    wb.burst_read(ADDR_DATA, N, q, bad);
    check(bad == 0, {what, ": every burst read acknowledged after two clocks"});
    check(q.size() == N, {what, ": all words returned"});
    for (int k = 0; k < q.size(); k++)
      check(q[k] == 32'(last - (N - 1) + k),
            $sformatf("%s word %0d: got %0d expected %0d", what, k, q[k], last - (N - 1) + k));
  endtask

  initial begin
    scope_ctrl_t c;
    logic [31:0] d;
    int lat, trig_sample, h, guard;

    repeat (3) @(posedge clk); #1;
    reset = 0;
    ctrl_read(c);
    check(c.lgmem == 5'(LGMEM), "LGMEM field");
    check(c.holdoff == 20'(N - 4), $sformatf("default holdoff %0d", c.holdoff));
    check(!c.stopped && !c.triggered && !c.manual && !c.disabled, "flags clear after reset");

    // byte-lane holdoff writes; sel[3] clear so these also reset
    ctrl_write(32'h000a_bbcc, 4'b0110);
    ctrl_read(c);
    check(c.holdoff == 20'ha_bb3c, $sformatf("holdoff lanes 1,2: %h", c.holdoff));
    ctrl_write(32'h0000_0007, 4'b0001);
    ctrl_read(c);
    check(c.holdoff == 20'ha_bb07, $sformatf("holdoff lane 0: %h", c.holdoff));

    // --- hardware trigger with holdoff 5 ---
    h = 5;
    ctrl_write(32'(h));                     // bit 31 clear: reset
    ctrl_read(c);
    check(!c.primed, "not primed right after reset");
    run_probe = 1;
    // a live read before the stop returns the probe word of the pre-read clock
    wb.cyc = 1; wb.stb = 1; wb.we = 0; wb.addr = ADDR_DATA;
    @(posedge clk); #1; wb.stb = 0;
    d = data;                                  // probe value during the pre-read clock
    @(posedge clk); #1;
    check(wb.ack && wb.rdata == d, $sformatf("live read %0d expected %0d", wb.rdata, d));
    wb.cyc = 0;
    wait_flag(BIT_PRIMED);
    ctrl_read(c);
    check(!c.triggered && !c.stopped && !irq, "primed, waiting for trigger");
    // trigger on a clock with ce
    @(posedge clk); #3;
    ce = 1; trig = 1; trig_sample = int'(data);
    run_probe = 0;
    @(posedge clk); #1;
    trig = 0; run_probe = 1;
    wait_flag(BIT_STOPPED);
    check(irq, "interrupt while stopped");
    ctrl_read(c);
    check(c.triggered && c.primed, "triggered and primed when stopped");
    run_probe = 0; ce = 0;
    check_trace(trig_sample + h, "hardware trigger");

    // --- disabled hardware trigger, then manual trigger with holdoff 0 ---
    h = 0;
    ctrl_write(32'h0400_0000 | 32'(h));      // reset, disable the hardware trigger
    ctrl_read(c);
    check(c.disabled && !c.stopped, "disable bit set, capture restarted");
    run_probe = 1;
    wait_flag(BIT_PRIMED);
    trig = 1;
    repeat (20) @(posedge clk);
    #1 trig = 0;
    ctrl_read(c);
    check(!c.triggered && !c.stopped, "disabled hardware trigger ignored");
    // manual trigger, no reset, keep the trigger disabled
    run_probe = 0;
    @(posedge clk); #3; ce = 0;
    wb.cyc = 1; wb.stb = 1; wb.we = 1; wb.addr = ADDR_CONTROL; wb.sel = 4'hf;
    wb.wdata = 32'h8c00_0000 | 32'(h);
    @(posedge clk); #1; wb.stb = 0;        // m_trigger rises now
    ce = 1; trig_sample = int'(data);      // first sample seen with the trigger
    @(posedge clk); #1; ce = 0;
    @(posedge clk); #1; wb.cyc = 0;
    ctrl_read(c);
    check(c.manual && c.triggered && c.stopped, "manual trigger stops capture");
    // holdoff 0 and the trigger clock had a sample: that sample is the newest
    check_trace(trig_sample, "manual trigger");

    // --- a write with bit 31 set leaves a stopped trace alone ---
    ctrl_write(32'h8000_0000);
    ctrl_read(c);
    check(c.stopped && c.holdoff == 20'd0, "no-reset write keeps the trace");
    ctrl_write(32'h0000_0010);
    ctrl_read(c);
    check(!c.stopped && !c.triggered && !c.manual && !irq, "reset clears the flags");

    check(bus_checks > 0, "bus monitor ran");
    checks += bus_checks; failures += bus_violations;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
