// Self-checking test of scope_mem: fills a small memory with random words, reads every
// address back and checks the one-clock registered read, that the output holds while
// no read is requested, and that a read of an address being written returns the old
// word.
module tb_scope_mem;
  localparam int W = 16, LGMEM = 4, N = 1 << LGMEM;
  logic             clk = 0;
  logic             we = 0, re = 0;
  logic [LGMEM-1:0] waddr = '0, raddr = '0;
  logic [W-1:0]     wdata = '0, rdata;
  logic [W-1:0]     model [N];
  int checks = 0, failures = 0;

  scope_mem #(.W(W), .LGMEM(LGMEM)) dut (
    .i_clk(clk), .i_we(we), .i_waddr(waddr), .i_wdata(wdata),
    .i_re(re), .i_raddr(raddr), .o_rdata(rdata));

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    for (int r = 0; r < 3; r++) begin
      for (int a = 0; a < N; a++) begin
        we = 1; waddr = a; wdata = W'($urandom); model[a] = wdata;
        @(posedge clk); #1;
      end
      we = 0;
      for (int a = N - 1; a >= 0; a--) begin
        re = 1; raddr = a;
        @(posedge clk); #1;
        re = 0;
        check(rdata, model[a], $sformatf("read addr %0d", a));
        raddr = raddr + 1;
        @(posedge clk); #1;
        check(rdata, model[a], "hold without read");
      end
    end
    // read during write of the same address returns the old word
    we = 1; waddr = 3; wdata = ~model[3]; re = 1; raddr = 3;
    @(posedge clk); #1;
    we = 0; re = 0;
    check(rdata, model[3], "read-during-write old word");
    model[3] = ~model[3];
    re = 1;
    @(posedge clk); #1;
    re = 0;
    check(rdata, model[3], "new word after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
