// Self-checking test of scope_capture with a 16-word memory.
//
// The probe word is a running sample number that advances on each clock with i_ce
// (i_ce is random, about 60 % of clocks). For each of several holdoff values and
// trigger styles the test resets the engine, checks that "primed" rises exactly after
// the 16th sample, fires the trigger (on an i_ce clock, or on a clock without i_ce),
// checks that capture stops once "holdoff" samples have followed the trigger clock
// (at least one if the trigger clock had none), and reads the whole trace back,
// expecting the 16 samples that end there, oldest first. A trigger before the memory is full must be ignored.
module tb_scope_capture;
  localparam int W = 32, LGMEM = 4, HB = 8, N = 1 << LGMEM;
  logic          clk = 0;
  logic          sreset = 1, ce = 0, trig = 0, rd = 0;
  logic [W-1:0]  data = '0, rd_data;
  logic [HB-1:0] holdoff = '0;
  logic          primed, triggered, stopped;
  int checks = 0, failures = 0;

  scope_capture #(.W(W), .LGMEM(LGMEM), .HOLDOFFBITS(HB)) dut (
    .i_clk(clk), .i_sreset(sreset), .i_ce(ce), .i_data(data), .i_trigger(trig),
    .i_holdoff(holdoff), .i_rd(rd), .o_primed(primed), .o_triggered(triggered),
    .o_stopped(stopped), .o_rd_data(rd_data));

  always #5 clk = ~clk;

  // probe: sample number advances after each clock with ce
  always_ff @(posedge clk) if (ce) data <= data + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int h, input bit trig_on_ce, input bit early_trigger);
    int count, trig_sample, last_sample, guard;
    logic [W-1:0] exp;
    sreset = 1; holdoff = HB'(h); ce = 0; trig = 0;
    @(posedge clk); #1;
    sreset = 0;
    count = 0;
    // fill: primed must rise right after the Nth sample
    while (count < N + 3) begin
      ce = ($urandom_range(99) < 60);
      trig = early_trigger && (count == N / 2);
      @(posedge clk); #1;
      if (ce) count++;
      check(primed == (count >= N), $sformatf("primed after %0d samples", count));
      check(!triggered, "no trigger before it is wanted");
    end
    // trigger
    ce = trig_on_ce;
    trig = 1;
    trig_sample = int'(data);
    @(posedge clk); #1;
    trig = 0;
    check(triggered, "triggered one clock after trigger");
    // Samples recorded after the trigger clock: h, and at least one when the
    // trigger clock itself carried no sample. last_sample is the sample number
    // expected to close the trace.
    if (!trig_on_ce) trig_sample = trig_sample - 1;   // newest sample before trigger
    last_sample = trig_sample + ((!trig_on_ce && h == 0) ? 1 : h);
    guard = 0;
    while (!stopped && guard < 1000) begin
      ce = ($urandom_range(99) < 60);
      @(posedge clk); #1;
      guard++;
    end
    ce = 0;
    check(stopped, "stopped");
    check(int'(data) - 1 == last_sample,
          $sformatf("holdoff %0d: last sample %0d, expected %0d",
                    h, int'(data) - 1, last_sample));
    // samples after a stop are not recorded
    repeat (5) begin ce = 1; @(posedge clk); #1; end
    ce = 0;
    // read back
    for (int k = 0; k < N; k++) begin
      rd = 1;
      @(posedge clk); #1;
      rd = 0;
      exp = W'(last_sample - (N - 1) + k);
      check(rd_data == exp, $sformatf("h=%0d word %0d: got %0d expected %0d",
                                      h, k, rd_data, exp));
    end
  endtask

  initial begin
    @(posedge clk); #1;
    run(0, 1, 0);
    run(1, 1, 0);
    run(5, 1, 1);
    run(0, 0, 0);
    run(3, 0, 0);
    run(12, 1, 0);
    run(40, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
