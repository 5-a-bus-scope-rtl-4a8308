// Self-checking test of sfifo (4 entries): random pushes and pops, never pushing when
// full nor popping when empty, compared against a queue model. Checks the data order,
// the full and empty flags and the fill count on every clock, and that a push and a
// pop in the same clock both take effect.
module tb_sfifo;
  localparam int DW = 8, LGFLEN = 2, DEPTH = 1 << LGFLEN;
  logic clk = 0, reset = 1, wr = 0, rd = 0;
  logic [DW-1:0] din = '0, dout;
  logic full, empty;
  logic [LGFLEN:0] fill;
  logic [DW-1:0] model[$];
  int checks = 0, failures = 0, both = 0, fulls = 0;

  sfifo #(.DW(DW), .LGFLEN(LGFLEN)) dut (
    .i_clk(clk), .i_reset(reset), .i_wr(wr), .i_data(din), .o_full(full),
    .i_rd(rd), .o_data(dout), .o_empty(empty), .o_fill(fill));

  always #5 clk = ~clk;

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

  initial begin
    repeat (2) @(posedge clk); #1;
    reset = 0;
    for (int t = 0; t < 4000; t++) begin
      int pw;
      pw = (t / 1000) % 2 ? 90 : 30;
      check(fill == model.size(), $sformatf("fill %0d vs %0d", fill, model.size()));
      check(full == (model.size() == DEPTH), "full flag");
      check(empty == (model.size() == 0), "empty flag");
      if (model.size() > 0) check(dout == model[0], $sformatf("head %h vs %h", dout, model[0]));
      wr = ($urandom_range(99) < pw) && model.size() < DEPTH;
      rd = ($urandom_range(99) < 100 - pw) && model.size() > 0;
      din = DW'($urandom);
      @(posedge clk);
      if (rd) void'(model.pop_front());
      if (wr) model.push_back(din);
      if (wr && rd) both++;
      if (full) fulls++;
      #1;
    end
    check(both > 100 && fulls > 20, $sformatf("simultaneous %0d, full %0d", both, fulls));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
