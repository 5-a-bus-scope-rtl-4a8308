// AXI4-Lite bus scope: the same internal logic analyser as wbscope behind an AXI4-Lite
// slave port.
//
// The register map (control word at byte address 0, data word at byte address 4) and
// the capture behaviour are those of scope_core. AXI-Lite addresses bytes, so the word
// select is address bit 2. Each request channel (AW, W, AR) enters through a skid
// buffer. A write is taken once both address and data are waiting and the B channel
// can accept a response; writes suffer no back-pressure inside the scope. Reads go
// through the same two-stage pipeline as on Wishbone (address, then memory, then
// response). The pipeline itself cannot stall, so R-channel back-pressure must be
// kept from overflowing it. Two ways are offered:
//   OPT_DOUBLE_FIFO = 0: only one read is admitted at a time (none in the pipeline
//     and the R channel free). Sustained throughput is one word every two clocks.
//   OPT_DOUBLE_FIFO = 1 (default): a control FIFO of 2**LGFIFO entries counts the
//     reads in flight and holds ARREADY low when full; the pipeline feeds a data FIFO
//     of the same depth that drives the R channel. One word per clock is sustained
//     and RVALID follows ARVALID by two clocks.
// The response is held until RREADY. All responses are OKAY.
//
// The write-admission rule, the one-read-at-a-time rule and the control-FIFO/data-
// FIFO structure follow the original scope's AXI-Lite notes. The skid buffers, the
// FIFO depth and the handling of PROT and RESP are this implementation's choices.
// ARESETN is active low and synchronous.
module axilscope #(
  parameter int unsigned W                = 32,
  parameter int unsigned LGMEM            = 12,
  parameter int unsigned HOLDOFFBITS      = 20,
  parameter int unsigned C_AXI_ADDR_WIDTH = 3,
  parameter bit          OPT_DOUBLE_FIFO  = 1'b1,
  parameter int unsigned LGFIFO           = 2
) (
  input  logic                        S_AXI_ACLK,
  input  logic                        S_AXI_ARESETN,
  input  logic                        S_AXI_AWVALID,
  output logic                        S_AXI_AWREADY,
  input  logic [C_AXI_ADDR_WIDTH-1:0] S_AXI_AWADDR,
  input  logic [2:0]                  S_AXI_AWPROT,
  input  logic                        S_AXI_WVALID,
  output logic                        S_AXI_WREADY,
  input  logic [31:0]                 S_AXI_WDATA,
  input  logic [3:0]                  S_AXI_WSTRB,
  output logic                        S_AXI_BVALID,
  input  logic                        S_AXI_BREADY,
  output logic [1:0]                  S_AXI_BRESP,
  input  logic                        S_AXI_ARVALID,
  output logic                        S_AXI_ARREADY,
  input  logic [C_AXI_ADDR_WIDTH-1:0] S_AXI_ARADDR,
  input  logic [2:0]                  S_AXI_ARPROT,
  output logic                        S_AXI_RVALID,
  input  logic                        S_AXI_RREADY,
  output logic [31:0]                 S_AXI_RDATA,
  output logic [1:0]                  S_AXI_RRESP,
  // probe
  input  logic                        i_ce,
  input  logic                        i_trigger,
  input  logic [W-1:0]                i_data,
  output logic                        o_interrupt
);

  logic        reset;
  logic        skd_awvalid, skd_wvalid, skd_arvalid;
  logic        skd_awaddr, skd_araddr;
  logic [35:0] skd_w;
  logic        axil_write_ready, axil_read_ready;
  logic        pre_read;
  logic [31:0] rdata_next;

  assign reset = !S_AXI_ARESETN;


  skidbuffer #(.DW(1)) u_skd_aw (
    .i_clk (S_AXI_ACLK), .i_reset (reset),
    .i_valid (S_AXI_AWVALID), .o_ready (S_AXI_AWREADY), .i_data (S_AXI_AWADDR[2]),
    .o_valid (skd_awvalid), .i_ready (axil_write_ready), .o_data (skd_awaddr)
  );

  skidbuffer #(.DW(36)) u_skd_w (
    .i_clk (S_AXI_ACLK), .i_reset (reset),
    .i_valid (S_AXI_WVALID), .o_ready (S_AXI_WREADY), .i_data ({S_AXI_WSTRB, S_AXI_WDATA}),
    .o_valid (skd_wvalid), .i_ready (axil_write_ready), .o_data (skd_w)
  );

  skidbuffer #(.DW(1)) u_skd_ar (
    .i_clk (S_AXI_ACLK), .i_reset (reset),
    .i_valid (S_AXI_ARVALID), .o_ready (S_AXI_ARREADY), .i_data (S_AXI_ARADDR[2]),
    .o_valid (skd_arvalid), .i_ready (axil_read_ready), .o_data (skd_araddr)
  );

  assign axil_write_ready = skd_awvalid && skd_wvalid && (!S_AXI_BVALID || S_AXI_BREADY);
  // axil_read_ready: see the read path below

  scope_core #(.W(W), .LGMEM(LGMEM), .HOLDOFFBITS(HOLDOFFBITS)) u_core (
    .i_clk        (S_AXI_ACLK),
    .i_reset      (reset),
    .i_wr         (axil_write_ready),
    .i_rd         (axil_read_ready),
    .i_wr_addr    (skd_awaddr),
    .i_rd_addr    (skd_araddr),
    .i_wdata      (skd_w[31:0]),
    .i_sel        (skd_w[35:32]),
    .o_rdata_next (rdata_next),
    .i_ce         (i_ce),
    .i_trigger    (i_trigger),
    .i_data       (i_data),
    .o_interrupt  (o_interrupt)
  );

  always_ff @(posedge S_AXI_ACLK)
    if (reset)
      S_AXI_BVALID <= 1'b0;
    else if (axil_write_ready)
      S_AXI_BVALID <= 1'b1;
    else if (S_AXI_BREADY)
      S_AXI_BVALID <= 1'b0;

  always_ff @(posedge S_AXI_ACLK)
    if (reset)
      pre_read <= 1'b0;
    else
      pre_read <= axil_read_ready;

  generate if (OPT_DOUBLE_FIFO) begin : g_double_fifo
    // Control FIFO: one entry per read in flight, from AR acceptance to the R
    // handshake; its contents are never used, only its fill. Data FIFO: the read
    // pipeline's results. Since every word in the pipeline or the data FIFO holds a
    // control FIFO entry, the data FIFO cannot overflow.
    logic ctrl_full, ctrl_empty, ctrl_unused, data_full, data_empty;
    logic [LGFIFO:0] ctrl_fill, data_fill;
    logic r_take;

    assign r_take          = S_AXI_RVALID && S_AXI_RREADY;
    assign axil_read_ready = skd_arvalid && !ctrl_full;

    sfifo #(.DW(1), .LGFLEN(LGFIFO)) u_ctrl_fifo (
      .i_clk (S_AXI_ACLK), .i_reset (reset),
      .i_wr (axil_read_ready), .i_data (skd_araddr), .o_full (ctrl_full),
      .i_rd (r_take), .o_data (ctrl_unused), .o_empty (ctrl_empty), .o_fill (ctrl_fill)
    );

    sfifo #(.DW(32), .LGFLEN(LGFIFO)) u_data_fifo (
      .i_clk (S_AXI_ACLK), .i_reset (reset),
      .i_wr (pre_read), .i_data (rdata_next), .o_full (data_full),
      .i_rd (r_take), .o_data (S_AXI_RDATA), .o_empty (data_empty), .o_fill (data_fill)
    );

    assign S_AXI_RVALID = !data_empty;

    a_data_fits: assert property (@(posedge S_AXI_ACLK) disable iff (reset)
        data_fill + (LGFIFO+1)'(pre_read) <= ctrl_fill && !(ctrl_empty && !data_empty)
        && !(pre_read && data_full));
  end else begin : g_single
    // Only one read in the pipeline at a time; the response register is free by
    // the time the pipeline delivers.
    assign axil_read_ready = skd_arvalid && (!S_AXI_RVALID || S_AXI_RREADY) && !pre_read;

    always_ff @(posedge S_AXI_ACLK)
      if (reset)
        S_AXI_RVALID <= 1'b0;
      else if (pre_read)
        S_AXI_RVALID <= 1'b1;
      else if (S_AXI_RREADY)
        S_AXI_RVALID <= 1'b0;

    always_ff @(posedge S_AXI_ACLK)
      if (pre_read)
        S_AXI_RDATA <= rdata_next;
  end endgenerate

  assign S_AXI_BRESP = 2'b00;
  assign S_AXI_RRESP = 2'b00;

  // A response is never overwritten before it has been taken
  a_rhold: assert property (@(posedge S_AXI_ACLK) disable iff (reset)
      S_AXI_RVALID && !S_AXI_RREADY |=> S_AXI_RVALID && $stable(S_AXI_RDATA));

endmodule
