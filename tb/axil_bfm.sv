// AXI4-Lite master for testbenches.
//
// write() presents AW and W together and waits for B; read() presents AR and waits
// for R. rready_pct sets how often RREADY (and BREADY) is high, so that tests can apply
// back-pressure. burst_read() keeps ARVALID high for n reads of one address and
// returns the replies and the number of clocks the burst took.
interface axil_bfm (input logic clk);
  logic        awvalid = 1'b0, wvalid = 1'b0, bready = 1'b0, arvalid = 1'b0, rready = 1'b0;
  logic [2:0]  awaddr = '0, araddr = '0;
  logic [31:0] wdata = '0;
  logic [3:0]  wstrb = '0;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [1:0]  bresp, rresp;
  logic [31:0] rdata;
  int          rready_pct = 100;

  task automatic write(input logic [2:0] a, input logic [31:0] d, input logic [3:0] s);
    bit aw_done, w_done;
    int guard;
    awvalid = 1; awaddr = a; wvalid = 1; wdata = d; wstrb = s;
    aw_done = 0; w_done = 0; guard = 0;
    while (!(aw_done && w_done) && guard < 100) begin
      @(posedge clk);
      if (awready) aw_done = 1;
      if (wready) w_done = 1;
      #1;
      if (aw_done) awvalid = 0;
      if (w_done) wvalid = 0;
      guard++;
    end
    bready = 1;
    while (!bvalid && guard < 100) begin @(posedge clk); #1; guard++; end
    @(posedge clk); #1;
    bready = 0;
  endtask

  task automatic read(input logic [2:0] a, output logic [31:0] d);
    int n;
    logic [31:0] q[$];
    burst_read(a, 1, q, n);
    d = q[0];
  endtask

  task automatic burst_read(input logic [2:0] a, input int n, ref logic [31:0] q[$],
                            output int clocks);
    int issued;
    issued = 0; clocks = 0;
    q.delete();
    araddr = a;
    arvalid = (n > 0);
    rready = ($urandom_range(99) < rready_pct);
    while (q.size() < n && clocks < 20*n + 50) begin
      @(posedge clk);
      if (arvalid && arready) issued++;
      if (rvalid && rready) q.push_back(rdata);
      #1;
      arvalid = (issued < n);
      rready = ($urandom_range(99) < rready_pct);
      clocks++;
    end
    arvalid = 0; rready = 0;
  endtask
endinterface
