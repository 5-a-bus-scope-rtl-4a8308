// End-to-end test of busscope_top at its default size (three 4096-word scopes).
//
// Each scope watches its own probe: the plain Wishbone scope a 32-bit sample counter,
// the compressed scope a 31-bit signal made of runs of random length (each run holds
// its run number), the AXI-Lite scope another sample counter. The test takes every
// scope through a full operation as a host would: reset by a control write, poll the
// control word until primed, trigger, poll until stopped, read the whole buffer.
//   1. plain scope, hardware trigger, holdoff 100; a live data read before the stop;
//   2. plain scope, hardware trigger disabled (a trigger is ignored), then a manual
//      trigger without reset and holdoff 0;
//   3. compressed scope, manual trigger, holdoff 50; the trace is decoded and each
//      complete run in it must have the length that was sent;
//   4. AXI-Lite scope, hardware trigger, holdoff 10, read with R-channel back-pressure.
// The interrupt vector must show each stopped scope at its own bit. Each mechanism
// (fill/prime, hardware trigger, holdoff countdown, immediate stop, manual trigger,
// disabled trigger, no-reset write, live read, run word, run closed by a new sample,
// R back-pressure, AR stall while the read FIFOs are full, interrupt) is counted; one that never
// happened counts as a failure.
module tb_busscope_top;
  import busscope_pkg::*;
  localparam int N = 1 << 12;
  logic clk = 0, reset = 1;
  logic ce = 0, trig = 0, cce = 0, ctrig = 0, ace = 0, atrig = 0;
  logic [31:0] debug = '0, adebug = '0;
  logic [30:0] cdebug = '0;
  logic [14:0] ints;
  bit run_probe = 0, run_cprobe = 0, run_aprobe = 0;
  int checks = 0, failures = 0;

  // mechanism counters
  typedef enum int {M_PRIMED, M_HWTRIG, M_HOLDOFF, M_IMMEDIATE, M_MANUAL, M_DISABLED,
                    M_NORESET, M_LIVE, M_RUNWORD, M_RUNCLOSED, M_RBACKP, M_ARSTALL, M_IRQ,
                    M_COUNT} mech_t;
  int mech[M_COUNT];

  wb_bfm   wb  (.clk(clk));
  wb_bfm   cwb (.clk(clk));
  axil_bfm ax  (.clk(clk));

  // Wishbone rules on both Wishbone ports, checked on every clock
  int bus_checks[2], bus_violations[2];
  wb_slave_check u_wb_check (
    .i_clk(clk), .i_reset(reset), .i_cyc(wb.cyc), .i_stb(wb.stb), .i_stall(wb.stall),
    .i_ack(wb.ack), .o_checks(bus_checks[0]), .o_violations(bus_violations[0]));
  wb_slave_check u_cwb_check (
    .i_clk(clk), .i_reset(reset), .i_cyc(cwb.cyc), .i_stb(cwb.stb), .i_stall(cwb.stall),
    .i_ack(cwb.ack), .o_checks(bus_checks[1]), .o_violations(bus_violations[1]));

  busscope_top dut (
    .i_clk(clk), .i_reset(reset),
    .i_wb_cyc(wb.cyc), .i_wb_stb(wb.stb), .i_wb_we(wb.we), .i_wb_addr(wb.addr),
    .i_wb_data(wb.wdata), .i_wb_sel(wb.sel), .o_wb_stall(wb.stall), .o_wb_ack(wb.ack),
    .o_wb_data(wb.rdata),
    .i_cwb_cyc(cwb.cyc), .i_cwb_stb(cwb.stb), .i_cwb_we(cwb.we), .i_cwb_addr(cwb.addr),
    .i_cwb_data(cwb.wdata), .i_cwb_sel(cwb.sel), .o_cwb_stall(cwb.stall),
    .o_cwb_ack(cwb.ack), .o_cwb_data(cwb.rdata),
    .S_AXI_AWVALID(ax.awvalid), .S_AXI_AWREADY(ax.awready), .S_AXI_AWADDR(ax.awaddr),
    .S_AXI_AWPROT(3'b000),
    .S_AXI_WVALID(ax.wvalid), .S_AXI_WREADY(ax.wready), .S_AXI_WDATA(ax.wdata),
    .S_AXI_WSTRB(ax.wstrb),
    .S_AXI_BVALID(ax.bvalid), .S_AXI_BREADY(ax.bready), .S_AXI_BRESP(ax.bresp),
    .S_AXI_ARVALID(ax.arvalid), .S_AXI_ARREADY(ax.arready), .S_AXI_ARADDR(ax.araddr),
    .S_AXI_ARPROT(3'b000),
    .S_AXI_RVALID(ax.rvalid), .S_AXI_RREADY(ax.rready), .S_AXI_RDATA(ax.rdata),
    .S_AXI_RRESP(ax.rresp),
    .i_ce(ce), .i_trigger(trig), .i_debug(debug),
    .i_cce(cce), .i_ctrigger(ctrig), .i_cdebug(cdebug),
    .i_ace(ace), .i_atrigger(atrig), .i_adebug(adebug),
    .o_int_vector(ints));

  always #5 clk = ~clk;

  // probes
  always_ff @(posedge clk) if (ce) debug <= debug + 1;
  always_ff @(posedge clk) if (ace) adebug <= adebug + 1;
  always @(posedge clk) begin
    #2;
    if (run_probe) ce <= ($urandom_range(99) < 50);
    if (run_aprobe) ace <= ($urandom_range(99) < 50);
  end

  // compressed probe: run k holds value k; run lengths recorded as sent
  int run_len[int];
  always @(posedge clk) begin
    if (cce) run_len[int'(cdebug)] = run_len.exists(int'(cdebug)) ? run_len[int'(cdebug)] + 1 : 1;
    #2;
    if (run_cprobe) begin
      cce <= ($urandom_range(99) < 60);
      if (cce && $urandom_range(99) < 25) cdebug <= cdebug + 1;
    end
  end

  // bus-level observations
  always @(posedge clk) if (!reset) begin
    if (ax.rvalid && !ax.rready) mech[M_RBACKP]++;
    if (ax.arvalid && !ax.arready) mech[M_ARSTALL]++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wb_ctrl(input bit compressed, input logic [31:0] d);
    int lat;
    if (compressed) cwb.write(ADDR_CONTROL, d, 4'hf, lat);
    else            wb.write(ADDR_CONTROL, d, 4'hf, lat);
    check(lat == 2, "control write acknowledged after two clocks");
  endtask

  task automatic wb_status(input bit compressed, output scope_ctrl_t c);
    logic [31:0] d; int lat;
    if (compressed) cwb.read(ADDR_CONTROL, d, lat);
    else            wb.read(ADDR_CONTROL, d, lat);
    check(lat == 2, "control read acknowledged after two clocks");
    c = d;
  endtask

  task automatic wb_wait(input bit compressed, input int bitpos);
    scope_ctrl_t c; int guard = 0;
    do begin wb_status(compressed, c); guard++; end while (!c[bitpos] && guard < 50000);
    check(c[bitpos], $sformatf("scope %0d: control bit %0d rises", compressed, bitpos));
    if (bitpos == BIT_PRIMED && c[bitpos]) mech[M_PRIMED]++;
  endtask

  task automatic ax_wait(input int bitpos);
    logic [31:0] d; int guard = 0;
    do begin ax.read(3'd0, d); guard++; end while (!d[bitpos] && guard < 50000);
    check(d[bitpos], $sformatf("AXI scope: control bit %0d rises", bitpos));
    if (bitpos == BIT_PRIMED && d[bitpos]) mech[M_PRIMED]++;
  endtask

  task automatic check_counter_trace(input logic [31:0] q[$], input int last, input string what);
    int bad = 0;
    check(q.size() == N, $sformatf("%s: %0d words", what, q.size()));
    foreach (q[k]) if (q[k] != 32'(last - (N - 1) + k)) begin
      if (bad < 5) $display("FAIL %s word %0d: %0d expected %0d", what, k, q[k], last - (N - 1) + k);
      bad++;
    end
    checks++;
    if (bad != 0) failures++;
  endtask

  initial begin
    scope_ctrl_t c;
    logic [31:0] q[$], d;
    logic [30:0] vals[$];
    int bad, trig_sample, h, lat, clocks;

    repeat (3) @(posedge clk); #1;
    reset = 0;
    wb_status(0, c);
    check(c.lgmem == 5'd12 && c.holdoff == 20'(N - 4), "plain scope default control word");
    check(ints == '0, "no interrupts after reset");

    // ---- 1. plain scope, hardware trigger, holdoff 100 ----
    h = 100;
    wb_ctrl(0, 32'(h));
    run_probe = 1;
    repeat (10) @(posedge clk);
    run_probe = 0; @(posedge clk); #3; ce = 0;
    wb.read(ADDR_DATA, d, lat);
    check(d == debug, "live read returns the current probe word");
    mech[M_LIVE]++;
    run_probe = 1;
    wb_wait(0, BIT_PRIMED);
    @(posedge clk); #3;
    run_probe = 0; ce = 1; trig = 1; trig_sample = int'(debug);
    @(posedge clk); #1;
    trig = 0; run_probe = 1;
    mech[M_HWTRIG]++;
    wb_status(0, c);
    check(c.triggered && !c.stopped, "counting down the holdoff");
    if (c.triggered && !c.stopped) mech[M_HOLDOFF]++;
    wb_wait(0, BIT_STOPPED);
    run_probe = 0; ce = 0;
    check(ints == 15'b001, $sformatf("interrupt vector %b", ints));
    if (ints[0]) mech[M_IRQ]++;
    wb.burst_read(ADDR_DATA, N, q, bad);
    check(bad == 0, "plain scope: burst read timing");
    check_counter_trace(q, trig_sample + h, "plain scope, hardware trigger");

    // ---- 2. disabled hardware trigger, manual trigger, holdoff 0 ----
    wb_ctrl(0, 32'h0400_0000);
    check(ints[0] == 1'b0, "interrupt cleared by reset");
    run_probe = 1;
    wb_wait(0, BIT_PRIMED);
    trig = 1; repeat (30) @(posedge clk); #1; trig = 0;
    wb_status(0, c);
    check(!c.triggered && c.disabled, "disabled hardware trigger ignored");
    if (!c.triggered) mech[M_DISABLED]++;
    run_probe = 0; @(posedge clk); #3; ce = 1;
    wb.cyc = 1; wb.stb = 1; wb.we = 1; wb.addr = ADDR_CONTROL; wb.sel = 4'hf;
    wb.wdata = 32'h8c00_0000;                 // no reset, manual trigger, keep disabled
    @(posedge clk); #1; wb.stb = 0;
    trig_sample = int'(debug);                // sampled on the first clock with the trigger
    @(posedge clk); #1; ce = 0;
    @(posedge clk); #1; wb.cyc = 0;
    mech[M_NORESET]++;
    wb_status(0, c);
    check(c.manual && c.stopped && c.holdoff == 0, "manual trigger stopped at once");
    if (c.manual) mech[M_MANUAL]++;
    if (c.stopped) mech[M_IMMEDIATE]++;
    wb.burst_read(ADDR_DATA, N, q, bad);
    check(bad == 0, "plain scope: second burst timing");
    check_counter_trace(q, trig_sample, "plain scope, manual trigger");

    // ---- 3. compressed scope, manual trigger, holdoff 50 ----
    h = 50;
    wb_ctrl(1, 32'(h));
    run_cprobe = 1;
    wb_wait(1, BIT_PRIMED);
    wb_ctrl(1, 32'h8800_0000 | 32'(h));
    wb_wait(1, BIT_STOPPED);
    run_cprobe = 0; cce = 0;
    check(ints[1], "compressed scope interrupt");
    if (ints[1]) mech[M_IRQ]++;
    cwb.burst_read(ADDR_DATA, N, q, bad);
    check(bad == 0, "compressed scope: burst read timing");
    // decode, skipping a leading repeat word that has no sample before it
    vals.delete();
    foreach (q[k]) begin
      if (q[k][RLE_FLAG]) begin
        mech[M_RUNWORD]++;
        if (k > 0 && !q[k-1][RLE_FLAG] && k + 1 < N && !q[k+1][RLE_FLAG]) mech[M_RUNCLOSED]++;
        if (vals.size() > 0)
          for (int r = 0; r <= int'(q[k][30:0]); r++) vals.push_back(vals[$]);
      end else
        vals.push_back(q[k][30:0]);
    end
    begin
      int first, start, runs_checked;
      bad = 0; runs_checked = 0; start = 0;
      // walk complete runs: those with a different value on both sides
      for (int i = 1; i < vals.size(); i++) begin
        if (vals[i] != vals[i-1]) begin
          if (start > 0) begin
            if (vals[i-1] != vals[start-1] + 1) bad++;
            if (i - start != run_len[int'(vals[i-1])]) bad++;
            runs_checked++;
          end
          start = i;
        end
      end
      check(bad == 0 && runs_checked > 50,
            $sformatf("compressed trace: %0d runs checked, %0d wrong", runs_checked, bad));
      check(vals.size() > N, $sformatf("compression: %0d words hold %0d samples", N, vals.size()));
    end

    // ---- 4. AXI-Lite scope, hardware trigger, holdoff 10, back-pressured reads ----
    h = 10;
    ax.write(3'd0, 32'(h), 4'hf);
    run_aprobe = 1;
    ax_wait(BIT_PRIMED);
    @(posedge clk); #3;
    run_aprobe = 0; ace = 1; atrig = 1; trig_sample = int'(adebug);
    @(posedge clk); #1;
    atrig = 0; run_aprobe = 1;
    ax_wait(BIT_STOPPED);
    run_aprobe = 0; ace = 0;
    check(ints == 15'b111, $sformatf("interrupt vector %b", ints));
    if (ints[2]) mech[M_IRQ]++;
    ax.rready_pct = 50;
    ax.burst_read(3'd4, N, q, clocks);
    check_counter_trace(q, trig_sample + h, "AXI-Lite scope");
    // with RREADY always high the FIFO read path returns one word per clock
    ax.rready_pct = 100;
    ax.burst_read(3'd4, 64, q, clocks);
    check(clocks <= 64 + 3, $sformatf("64 AXI-Lite reads took %0d clocks", clocks));

    for (int m = 0; m < M_COUNT; m++) begin
      mech_t mm;
      mm = mech_t'(m);
      $display("mechanism %-12s happened %0d times", mm.name(), mech[m]);
      check(mech[m] > 0, $sformatf("mechanism %s never happened", mm.name()));
    end
    for (int i = 0; i < 2; i++) begin
      check(bus_checks[i] > 0, "bus monitor ran");
      checks += bus_checks[i]; failures += bus_violations[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
