// tb_uart_sync: self-checking test of the synchronization unit.
//
// The unit shares a timing unit with the testbench, as in the module. The
// testbench drives the synchronization byte (start bit, 0x55 LSB first, parity
// '1', stop '1') with a chosen cell length and checks:
//   * EUBRS = 8 * cell / 16 for exact cells, and the sum of the first eight
//     cells / 16 when one cell is 3 % long (inside the 4 % tolerance);
//   * a pattern with one cell 10 % long is rejected, and a good pattern after
//     it is accepted;
//   * a pattern not preceded by bus silence is not taken for a sync byte;
//   * done comes one cycle after the final rising edge, and active covers the
//     whole search.
module tb_uart_sync;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, line, clr, active, done;
  logic [15:0] timer, eubrs;
  int checks = 0, failures = 0;
  int n_done;
  logic [15:0] got;

  uart_timer u_tmr (.clk_i(clk), .rst_ni(rst_n), .srst_i(1'b0), .clr_i(clr), .wr_i(1'b0),
                    .wdata_i(16'd0), .tstm_i(16'd0), .value_o(timer), .match_o());
  uart_sync dut (.clk_i(clk), .rst_ni(rst_n), .srst_i(1'b0), .start_i(start), .line_i(line),
                 .timer_i(timer), .timer_clr_o(clr), .active_o(active), .done_o(done),
                 .eubrs_o(eubrs));

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (done) begin n_done++; got = eubrs; end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic arm();
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
  endtask

  // cells 0..8 alternate 0,1,0,...,0; then parity and stop at '1'.
  // stretch_cell gets stretch extra cycles.
  task automatic pattern(int bitlen, int stretch_cell, int stretch, output int t8);
    t8 = 0;
    for (int i = 0; i < 9; i++) begin
      int len = bitlen + ((i == stretch_cell) ? stretch : 0);
      if (i < 8) t8 += len;
      for (int c = 0; c < len; c++) begin
        @(negedge clk);
        line = i[0];
      end
    end
    @(negedge clk);
    line = 1'b1;      // the final rising edge
    @(negedge clk);
    check(done == 1'b1, "done one cycle after the final edge");
    repeat (2 * bitlen) @(negedge clk);
  endtask

  initial begin
    int t8;
    start = 1'b0; line = 1'b1; n_done = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check(!active, "idle after reset");
    arm();
    check(active, "active after start");
    repeat (40) @(negedge clk);
    pattern(200, -1, 0, t8);
    check(got == 16'((t8 + 8) / 16) && got == 16'd100, $sformatf("EUBRS %0d for 200-cycle bits", got));
    check(!active, "inactive after success");

    arm(); repeat (40) @(negedge clk);
    pattern(203, -1, 0, t8);
    check(got == 16'((t8 + 8) / 16), $sformatf("EUBRS %0d (exp %0d)", got, (t8 + 8) / 16));

    arm(); repeat (40) @(negedge clk);
    pattern(200, 5, 6, t8);    // 3 % long cell: accepted
    check(got == 16'((t8 + 8) / 16), $sformatf("EUBRS %0d with 3%% cell (exp %0d)", got, (t8 + 8) / 16));

    // 10 % long cell: rejected, then a good one is taken
    arm(); repeat (40) @(negedge clk);
    for (int i = 0; i < 9; i++) begin
      for (int c = 0; c < 150 + ((i == 4) ? 15 : 0); c++) begin @(negedge clk); line = i[0]; end
    end
    @(negedge clk); line = 1'b1;
    n_done = 0;
    repeat (300) @(negedge clk);
    check(n_done == 0 && active, "10 % deviation rejected, still searching");
    pattern(150, -1, 0, t8);
    check(got == 16'd75, $sformatf("EUBRS %0d after retry (75)", got));

    // no silence before the pattern: bus low when armed, only 5 idle cycles
    @(negedge clk); line = 1'b0;
    arm();
    repeat (30) @(negedge clk);
    line = 1'b1;
    repeat (5) @(negedge clk);
    n_done = 0;
    for (int i = 0; i < 9; i++) begin
      for (int c = 0; c < 100; c++) begin @(negedge clk); line = i[0]; end
    end
    @(negedge clk); line = 1'b1;
    repeat (300) @(negedge clk);
    check(n_done == 0, "pattern without preceding silence ignored");
    pattern(120, -1, 0, t8);
    check(got == 16'd60, $sformatf("EUBRS %0d (60)", got));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
