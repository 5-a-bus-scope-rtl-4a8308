// Self-checking test of axilscope with a 32-word memory, run on two instances: one
// admitting one read at a time (OPT_DOUBLE_FIFO = 0), one with the control-FIFO /
// data-FIFO read path (OPT_DOUBLE_FIFO = 1). The same sequence is run on each.
//
// The probe word is a running sample number advancing on random i_ce clocks. The test
// resets the scope through an AXI-Lite write, polls the control word (byte address 0)
// until primed, fires the hardware trigger, polls until stopped and reads the trace
// from byte address 4: first with RREADY always high, where one read completes every
// two clocks with one read at a time and every clock with the FIFOs, then, after a manual trigger, with RREADY
// high only 40 % of the time. Each trace must end holdoff samples after its trigger
// sample, oldest first, and all responses must be OKAY.
module tb_axilscope;
  import busscope_pkg::*;
  localparam int LGMEM = 5, N = 1 << LGMEM;
  logic        clk = 0, resetn = 0;
  logic        ce = 0, trig = 0;
  logic [31:0] data = '0;
  logic        irq;
  bit          run_probe = 0;
  int checks = 0, failures = 0;

  axil_bfm ax0 (.clk(clk));
  axil_bfm ax1 (.clk(clk));
  virtual axil_bfm ax;
  logic [1:0] trigv, irqv;
  int   opt;
  assign trigv = {trig && opt == 1, trig && opt == 0};
  assign irq   = irqv[opt];

  axilscope #(.W(32), .LGMEM(LGMEM), .HOLDOFFBITS(20), .C_AXI_ADDR_WIDTH(3),
              .OPT_DOUBLE_FIFO(1'b0), .LGFIFO(2)) dut0 (
    .S_AXI_ACLK(clk), .S_AXI_ARESETN(resetn),
    .S_AXI_AWVALID(ax0.awvalid), .S_AXI_AWREADY(ax0.awready), .S_AXI_AWADDR(ax0.awaddr),
    .S_AXI_AWPROT(3'b000),
    .S_AXI_WVALID(ax0.wvalid), .S_AXI_WREADY(ax0.wready), .S_AXI_WDATA(ax0.wdata),
    .S_AXI_WSTRB(ax0.wstrb),
    .S_AXI_BVALID(ax0.bvalid), .S_AXI_BREADY(ax0.bready), .S_AXI_BRESP(ax0.bresp),
    .S_AXI_ARVALID(ax0.arvalid), .S_AXI_ARREADY(ax0.arready), .S_AXI_ARADDR(ax0.araddr),
    .S_AXI_ARPROT(3'b000),
    .S_AXI_RVALID(ax0.rvalid), .S_AXI_RREADY(ax0.rready), .S_AXI_RDATA(ax0.rdata),
    .S_AXI_RRESP(ax0.rresp),
    .i_ce(ce), .i_trigger(trigv[0]), .i_data(data), .o_interrupt(irqv[0]));

  axilscope #(.W(32), .LGMEM(LGMEM), .HOLDOFFBITS(20), .C_AXI_ADDR_WIDTH(3),
              .OPT_DOUBLE_FIFO(1'b1), .LGFIFO(2)) dut1 (
    .S_AXI_ACLK(clk), .S_AXI_ARESETN(resetn),
    .S_AXI_AWVALID(ax1.awvalid), .S_AXI_AWREADY(ax1.awready), .S_AXI_AWADDR(ax1.awaddr),
    .S_AXI_AWPROT(3'b000),
    .S_AXI_WVALID(ax1.wvalid), .S_AXI_WREADY(ax1.wready), .S_AXI_WDATA(ax1.wdata),
    .S_AXI_WSTRB(ax1.wstrb),
    .S_AXI_BVALID(ax1.bvalid), .S_AXI_BREADY(ax1.bready), .S_AXI_BRESP(ax1.bresp),
    .S_AXI_ARVALID(ax1.arvalid), .S_AXI_ARREADY(ax1.arready), .S_AXI_ARADDR(ax1.araddr),
    .S_AXI_ARPROT(3'b000),
    .S_AXI_RVALID(ax1.rvalid), .S_AXI_RREADY(ax1.rready), .S_AXI_RDATA(ax1.rdata),
    .S_AXI_RRESP(ax1.rresp),
    .i_ce(ce), .i_trigger(trigv[1]), .i_data(data), .o_interrupt(irqv[1]));

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (ce) data <= data + 1;
  always @(posedge clk) begin #2; if (run_probe) ce <= ($urandom_range(99) < 70); end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // responses are checked on every handshake
  always @(posedge clk) begin
    if (ax0.bvalid && ax0.bready && ax0.bresp != 2'b00) begin checks++; failures++; end
    if (ax0.rvalid && ax0.rready && ax0.rresp != 2'b00) begin checks++; failures++; end
    if (ax1.bvalid && ax1.bready && ax1.bresp != 2'b00) begin checks++; failures++; end
    if (ax1.rvalid && ax1.rready && ax1.rresp != 2'b00) begin checks++; failures++; end
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_flag(input int bitpos);
    logic [31:0] d; int guard = 0;
    do begin ax.read(3'd0, d); guard++; end while (!d[bitpos] && guard < 2000);
    check(d[bitpos], $sformatf("control bit %0d rises", bitpos));
  endtask

  task automatic check_trace(input int last, input string what, output int clocks);
    logic [31:0] q[$];
    ax.burst_read(3'd4, N, q, clocks);
    check(q.size() == N, {what, ": all words returned"});
    for (int k = 0; k < q.size(); k++)
      check(q[k] == 32'(last - (N - 1) + k),
            $sformatf("%s word %0d: got %0d expected %0d", what, k, q[k], last - (N - 1) + k));
  endtask

  task automatic run_test();
    logic [31:0] d;
    int trig_sample, h, clocks;
    ax.read(3'd0, d);
    check(d[24:20] == 5'(LGMEM) && d[19:0] == 20'(N - 4), $sformatf("control after reset %h", d));

    h = 3;
    ax.write(3'd0, 32'(h), 4'hf);             // reset with holdoff 3
    run_probe = 1;
    wait_flag(BIT_PRIMED);
    @(posedge clk); #3;
    run_probe = 0; ce = 1; trig = 1; trig_sample = int'(data);
    @(posedge clk); #1;
    trig = 0; run_probe = 1;
    wait_flag(BIT_STOPPED);
    check(irq, "interrupt when stopped");
    run_probe = 0; ce = 0;
    ax.rready_pct = 100;
    check_trace(trig_sample + h, "hardware trigger", clocks);
    if (opt == 0)
      check(clocks >= 2 * N - 1 && clocks <= 2 * N + 3,
            $sformatf("%0d reads took %0d clocks, expected about %0d", N, clocks, 2 * N));
    else
      check(clocks >= N + 1 && clocks <= N + 3,
            $sformatf("%0d reads took %0d clocks, expected about %0d", N, clocks, N + 2));

    // manual trigger, holdoff 7, with read back-pressure
    h = 7;
    ax.write(3'd0, 32'(h), 4'hf);
    ax.read(3'd0, d);
    check(!d[BIT_STOPPED] && !d[BIT_TRIGGERED], "restarted");
    run_probe = 1;
    wait_flag(BIT_PRIMED);
    run_probe = 0;
    @(posedge clk); #3; ce = 0;
    ax.write(3'd0, 32'h8800_0000 | 32'(h), 4'hf);   // no reset, manual trigger
    // the write completed with no sample taken: the trigger clock carried no sample,
    // so the trace ends with the h-th sample after it
    ax.read(3'd0, d);
    check(d[BIT_MANUAL] && d[BIT_TRIGGERED] && !d[BIT_STOPPED], $sformatf("manual trigger %h", d));
    trig_sample = int'(data);
    repeat (h - 1) begin ce = 1; @(posedge clk); #1; ce = 0; @(posedge clk); #1; end
    ax.read(3'd0, d);
    check(!d[BIT_STOPPED], "still running one sample before the end of the holdoff");
    repeat (3) begin ce = 1; @(posedge clk); #1; ce = 0; @(posedge clk); #1; end
    ax.read(3'd0, d);
    check(d[BIT_STOPPED], "stopped after holdoff");
    ax.rready_pct = 40;
    check_trace(trig_sample - 1 + h, "manual trigger", clocks);
    ax.rready_pct = 100;
  endtask

  initial begin
    opt = 0; ax = ax0;
    repeat (3) @(posedge clk); #1;
    resetn = 1;
    run_test();
    opt = 1; ax = ax1;
    run_test();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
