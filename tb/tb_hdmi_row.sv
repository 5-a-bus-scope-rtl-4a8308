// Workload test: catch one chosen row of a video frame with a trigger on start of frame
// and a long holdoff, using wbscope at its default size (4096 words, 20-bit holdoff).
//
// A video timing counter steps through (row, col) over the full raster, blanking
// included, one pixel per clock. Two standard rasters are run: 720p (1650 clocks per
// line, 750 lines) and 1080p (2200 clocks per line, 1125 lines). The probe word is
// {sof, 7'b0, row[11:0], col[11:0]}, and the hardware trigger is sof, true on row 0,
// column 0. To capture row 80, the holdoff is set to 80*L + L-1 for line length L, so
// the last recorded sample is the last pixel of row 80 and the 4096-word window holds
// all of row 80 plus the end of row 79.
//
// The scope is restarted two lines before the end of a frame. For 720p the next start
// of frame comes 3300 clocks later, before the buffer is full, and must be ignored; the
// capture then triggers on the frame after. For 1080p the start of frame comes after
// 4400 clocks and triggers at once. The test checks the control word, the interrupt,
// the number of frame starts seen before the trigger, every word of the trace, and that
// row 80 is present in full and in order.
module tb_hdmi_row;
  import busscope_pkg::*;
  localparam int N = 4096, ROW = 80;
  logic        clk = 0, reset = 1;
  logic        sof;
  logic [11:0] row, col;
  logic [31:0] probe;
  logic        irq;
  int          line_len = 1650, frame_rows = 750;
  int checks = 0, failures = 0;

  wb_bfm wb (.clk(clk));

  wbscope dut (
    .i_clk(clk), .i_reset(reset),
    .i_wb_cyc(wb.cyc), .i_wb_stb(wb.stb), .i_wb_we(wb.we), .i_wb_addr(wb.addr),
    .i_wb_data(wb.wdata), .i_wb_sel(wb.sel), .o_wb_stall(wb.stall), .o_wb_ack(wb.ack),
    .o_wb_data(wb.rdata),
    .i_ce(1'b1), .i_trigger(sof), .i_data(probe), .o_interrupt(irq));

  always #5 clk = ~clk;

  // raster counter; restart moves it to the start of a given row
  bit          restart = 1;   // holds the raster at row 0 until the first run
  logic [11:0] restart_row = '0;
  always_ff @(posedge clk)
    if (restart) begin
      row <= restart_row; col <= '0;
    end else if (int'(col) == line_len - 1) begin
      col <= '0;
      row <= (int'(row) == frame_rows - 1) ? '0 : row + 1'b1;
    end else
      col <= col + 1'b1;

  assign sof   = (row == '0) && (col == '0);
  assign probe = {sof, 7'b0, row, col};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // frame starts seen since the last restart, up to and including the trigger
  int sofs;
  always_ff @(posedge clk) if (restart) sofs <= 0; else if (sof && !reset && !irq) sofs <= sofs + 1;

  task automatic run(input int l, input int rows, input int want_sofs, input string name);
    int lat, holdoff, bad, cycles;
    logic [31:0] d;
    logic [31:0] q[$];
    int in_row;
    scope_ctrl_t c;
    line_len = l; frame_rows = rows;
    holdoff = ROW * l + l - 1;
    // restart the raster two lines before the end of the frame, and the scope with it
    restart_row = 12'(rows - 2); restart = 1;
    @(posedge clk); #1;
    restart = 0;
    wb.write(ADDR_CONTROL, 32'(holdoff), 4'hf, lat);
    check(lat == 2, {name, ": control write acknowledged after two clocks"});
    wb.read(ADDR_CONTROL, d, lat);
    c = d;
    check(!c.stopped && !c.triggered && c.holdoff == 20'(holdoff),
          $sformatf("%s: restarted with holdoff %0d, control %h", name, holdoff, d));
    cycles = 0;
    while (!irq && cycles < 2_000_000) begin @(posedge clk); #1; cycles++; end
    check(irq, {name, ": interrupt raised when capture stops"});
    check(sofs == want_sofs, $sformatf("%s: %0d frame starts up to the trigger, expected %0d",
                                       name, sofs, want_sofs));
    wb.read(ADDR_CONTROL, d, lat);
    c = d;
    check(c.stopped && c.triggered && c.primed, $sformatf("%s: control %h after stop", name, d));
    wb.burst_read(ADDR_DATA, N, q, bad);
    check(bad == 0 && q.size() == N, {name, ": 4096 words read, two clocks each"});
    in_row = 0;
    for (int k = 0; k < q.size(); k++) begin
      int s;
      s = holdoff - (N - 1) + k;            // samples after the start of frame
      check(q[k] == {1'b0, 7'b0, 12'(s / l), 12'(s % l)},
            $sformatf("%s word %0d: got row %0d col %0d, expected row %0d col %0d",
                      name, k, q[k][23:12], q[k][11:0], s / l, s % l));
      if (q[k][23:12] == 12'(ROW) && int'(q[k][11:0]) == in_row) in_row++;
    end
    check(in_row == l, $sformatf("%s: row %0d holds %0d of %0d pixels in order",
                                 name, ROW, in_row, l));
    $display("%s: row %0d captured, %0d words, holdoff %0d, %0d frame starts, %0d clocks to stop",
             name, ROW, N, holdoff, sofs, cycles);
  endtask

  initial begin
    repeat (3) @(posedge clk); #1;
    reset = 0;
    @(posedge clk); #1;
    // 720p: first start of frame comes before the buffer is full and is ignored
    run(1650, 750, 2, "720p");
    // 1080p: the first start of frame already triggers
    run(2200, 1125, 1, "1080p");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
