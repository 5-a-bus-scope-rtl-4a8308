// Wishbone pipelined bus master for testbenches.
//
// Drives cyc/stb/we/addr/data/sel and collects acknowledgements. write() and read()
// issue one request each and report the number of clocks from the request to its
// acknowledgement. burst_read() issues n back-to-back reads of one address, one per
// clock, and collects the n replies in order. Inputs are driven just after the rising
// edge so that the slave samples them on the next edge.
interface wb_bfm (input logic clk);
  logic        cyc = 1'b0, stb = 1'b0, we = 1'b0, addr = 1'b0;
  logic [31:0] wdata = '0;
  logic [3:0]  sel = '0;
  logic        stall, ack;
  logic [31:0] rdata;

  task automatic write(input logic a, input logic [31:0] d, input logic [3:0] s,
                       output int lat);
    cyc = 1; stb = 1; we = 1; addr = a; wdata = d; sel = s;
    @(posedge clk); #1;
    stb = 0; lat = 1;
    while (!ack && lat < 20) begin @(posedge clk); #1; lat++; end
    cyc = 0; we = 0;
  endtask

  task automatic read(input logic a, output logic [31:0] d, output int lat);
    cyc = 1; stb = 1; we = 0; addr = a; sel = 4'hf;
    @(posedge clk); #1;
    stb = 0; lat = 1;
    while (!ack && lat < 20) begin @(posedge clk); #1; lat++; end
    d = rdata;
    cyc = 0;
  endtask

  // n reads, one issued per clock; returns the replies and counts late ones
  task automatic burst_read(input logic a, input int n, ref logic [31:0] q[$],
                            output int bad_timing);
    int issued, got, cyc_n;
    int issue_cycle[$];
    issued = 0; got = 0; cyc_n = 0; bad_timing = 0;
    q.delete();
    cyc = 1; we = 0; addr = a; sel = 4'hf;
    while (got < n && cyc_n < n + 20) begin
      stb = (issued < n);
      @(posedge clk); #1;
      cyc_n++;
      if (stb) begin issue_cycle.push_back(cyc_n - 1); issued++; end  // presented in clock cyc_n-1
      if (ack) begin
        q.push_back(rdata);
        if (cyc_n - issue_cycle.pop_front() != 2) bad_timing++;
        got++;
      end
    end
    stb = 0; cyc = 0;
  endtask
endinterface
