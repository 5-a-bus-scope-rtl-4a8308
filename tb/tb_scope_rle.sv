// Self-checking test of scope_rle.
//
// Drives streams of 31-bit samples drawn from a small alphabet with long runs, first
// with i_ce on random clocks and then on every clock. The output words are decoded
// independently (bit 31 clear: a sample; set: the previous sample repeated 1 + bits
// 30:0 more times) and must reproduce the input stream exactly once a distinct final
// sample has closed the last run. The test also checks that no more words come out
// than went in, that each word's flag is right for what was sent, and that runs and
// back-to-back word pairs (a run closed by a new sample) both occurred.
module tb_scope_rle;
  logic        clk = 0, reset = 1;
  logic        ce = 0;
  logic [30:0] din = '0;
  logic        oce;
  logic [31:0] dout;
  logic [30:0] sent[$], decoded[$];
  int checks = 0, failures = 0, words = 0, runs = 0, pairs = 0, prev_oce = 0;

  scope_rle dut (.i_clk(clk), .i_reset(reset), .i_ce(ce), .i_data(din),
                 .o_ce(oce), .o_data(dout));

  always #5 clk = ~clk;

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

  // decoder
  always @(posedge clk) if (!reset) begin
    if (oce) begin
      words++;
      if (dout[31]) begin
        runs++;
        if (decoded.size() == 0) begin checks++; failures++; $display("FAIL run first"); end
        else for (longint r = 0; r <= longint'(dout[30:0]); r++) decoded.push_back(decoded[$]);
      end else
        decoded.push_back(dout[30:0]);
      if (prev_oce && !dout[31]) pairs++;
    end
    prev_oce <= oce && dout[31];
  end

  task automatic stream(input int n, input int ce_pct);
    logic [30:0] v = 31'(100);
    for (int i = 0; i < n; i++) begin
      ce = ($urandom_range(99) < ce_pct);
      if ($urandom_range(99) < 30) v = 31'($urandom_range(3));
      din = v;
      @(posedge clk);
      if (ce) sent.push_back(din);
      #1;
    end
    // close the last run with a sample seen nowhere else
    ce = 1; din = 31'h7fff_0000 + 31'(sent.size());
    @(posedge clk); sent.push_back(din); #1;
    ce = 0;
    repeat (3) @(posedge clk);
    #1;
    check(decoded.size() == sent.size(),
          $sformatf("decoded %0d samples, sent %0d", decoded.size(), sent.size()));
    for (int i = 0; i < sent.size() && i < decoded.size(); i++)
      check(decoded[i] == sent[i], $sformatf("sample %0d: %0d vs %0d", i, decoded[i], sent[i]));
    check(words <= sent.size(), $sformatf("%0d words for %0d samples", words, sent.size()));
  endtask

  initial begin
    repeat (2) @(posedge clk); #1;
    reset = 0;
    stream(3000, 60);
    // restart and run at the full rate
    reset = 1; @(posedge clk); #1; reset = 0;
    sent.delete(); decoded.delete(); words = 0;
    stream(3000, 100);
    check(runs > 100, $sformatf("runs seen: %0d", runs));
    check(pairs > 50, $sformatf("run word followed at once by a sample: %0d", pairs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
