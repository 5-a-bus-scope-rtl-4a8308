// Self-checking test of skidbuffer: random upstream valid and random downstream ready
// for several thousand clocks. Every word sent must arrive once, in order; o_ready
// must be high whenever the buffer is empty; and with the downstream always ready the
// buffer must pass one word per clock with no added latency.
module tb_skidbuffer;
  localparam int DW = 16;
  logic          clk = 0, reset = 1;
  logic          i_valid = 0, o_ready, o_valid, i_ready = 0;
  logic [DW-1:0] i_data = '0, o_data;
  logic [DW-1:0] sent[$];
  int checks = 0, failures = 0, received = 0;
  int vpct, rpct;
  bit taken = 1;

  skidbuffer #(.DW(DW)) dut (
    .i_clk(clk), .i_reset(reset), .i_valid(i_valid), .o_ready(o_ready), .i_data(i_data),
    .o_valid(o_valid), .i_ready(i_ready), .o_data(o_data));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard: called right at each edge, after the word taken there is recorded
  task automatic score();
    if (o_valid && i_ready) begin
      check(sent.size() > 0 && o_data == sent[0],
            $sformatf("word %0d: got %h expected %h", received, o_data,
                      sent.size() > 0 ? sent[0] : '0));
      if (sent.size() > 0) void'(sent.pop_front());
      received++;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1;
    reset = 0;
    for (int phase = 0; phase < 4; phase++) begin
      vpct = (phase == 3) ? 100 : 30 + 20 * phase;
      rpct = (phase == 3) ? 100 : 70 - 20 * phase;
      for (int t = 0; t < 2000; t++) begin
        if (!i_valid || taken) begin          // upstream keeps a waiting word steady
          i_valid = ($urandom_range(99) < vpct);
          i_data  = DW'($urandom);
        end
        i_ready = ($urandom_range(99) < rpct);
        @(posedge clk);
        taken = i_valid && o_ready;
        if (taken) sent.push_back(i_data);
        score();
        #1;
        if (phase == 3) check(o_ready && (!i_valid || (o_valid && o_data == i_data)),
                              "full rate: straight through");
      end
    end
    i_valid = 0; i_ready = 1;
    repeat (4) begin @(posedge clk); score(); end
    #1;
    check(sent.size() == 0, $sformatf("%0d words lost", sent.size()));
    check(received > 3000, $sformatf("only %0d words moved", received));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
