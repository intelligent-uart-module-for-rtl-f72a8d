// tb_uart_rx: self-checking test of the receive unit.
//
// A baud rate generator at EUBRS = 48 (three cycles per sample, 96 cycles per
// bit) feeds the receiver; the testbench drives the line with frames it builds
// itself. Checked: received words for several formats, the start and completion
// pulses and the exact number of cycles between them (96 per cell), parity
// error, frame error (stop bit '0'), oversampling error (a cell half '1', half
// '0'), a false start (short low pulse) and that nothing is received while the
// unit is disabled.
module tb_uart_rx;
  import uart_pkg::*;
  localparam int BT = 96;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en, line, tick, run, restart, busy, start_p, done_p, perr, ferr, oerr;
  logic [15:0] data;
  data0_t fmt;
  int checks = 0, failures = 0;
  int n_start, n_done, n_perr, n_ferr, n_oerr;
  longint t_start, t_done, cyc;
  logic [15:0] got;

  uart_ebrg u_brg (.clk_i(clk), .rst_ni(rst_n), .srst_i(1'b0), .eubrs_i(16'd48),
                   .tx_run_i(1'b0), .tx_restart_i(1'b0), .rx_run_i(run),
                   .rx_restart_i(restart), .tx_tick_o(), .rx_tick_o(tick));
  uart_rx dut (.clk_i(clk), .rst_ni(rst_n), .srst_i(1'b0), .enable_i(en), .line_i(line),
               .fmt_i(fmt), .tick_i(tick), .baud_run_o(run), .baud_restart_o(restart),
               .busy_o(busy), .start_o(start_p), .done_o(done_p), .data_o(data),
               .par_err_o(perr), .frame_err_o(ferr), .ovs_err_o(oerr));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (start_p) begin n_start++; t_start = cyc; end
    if (done_p)  begin n_done++; t_done = cyc; got = data; end
    if (perr) n_perr++;
    if (ferr) n_ferr++;
    if (oerr) n_oerr++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Drive one frame. bad_par flips the parity bit, bad_stop sends stop '0',
  // split_cell (>=0) drives that cell half '0' then half '1'.
  task automatic drive(logic [15:0] d, bit bad_par, bit bad_stop, int split_cell);
    bit cells[$];
    int n, p;
    n = (fmt.msg_length == 0) ? 16 : int'(fmt.msg_length);
    cells.push_back(1'b0);
    p = fmt.odd;
    for (int i = 0; i < n; i++) begin cells.push_back(d[i]); p ^= d[i]; end
    if (fmt.par_ena) cells.push_back(p[0] ^ bad_par);
    cells.push_back(!bad_stop);
    if (fmt.stop) cells.push_back(1'b1);
    n_start = 0; n_done = 0; n_perr = 0; n_ferr = 0; n_oerr = 0;
    foreach (cells[i]) begin
      for (int c = 0; c < BT; c++) begin
        @(negedge clk);
        line = (i == split_cell) ? (c >= BT / 2) : cells[i];
      end
    end
    @(negedge clk);
    line = 1'b1;
    repeat (2 * BT) @(negedge clk);
    check(n_start == 1 && n_done == 1, $sformatf("one start, one done (%0d,%0d)", n_start, n_done));
    check(t_done - t_start == longint'(BT * cells.size()),
          $sformatf("completion %0d cycles after start (%0d)", t_done - t_start, BT * cells.size()));
  endtask

  initial begin
    en = 1'b1; line = 1'b1; fmt = DATA0_RESET;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    drive(16'h00A5, 0, 0, -1);
    check(got == 16'h00A5 && n_perr == 0 && n_ferr == 0 && n_oerr == 0, "8O1 A5");
    drive(16'h003C, 1, 0, -1);
    check(got == 16'h003C && n_perr == 1 && n_ferr == 0, "parity error flagged");
    drive(16'h0081, 0, 1, -1);
    check(got == 16'h0081 && n_ferr == 1 && n_perr == 0, "frame error flagged");
    drive(16'h00FF, 0, 0, 3);
    check(n_oerr == 1 && n_ferr == 0, "oversampling error flagged");
    fmt = '{par_ena: 1'b0, odd: 1'b0, stop: 1'b1, tx_cnt: 1'b0, msg_length: 4'd0,
            overs_high: 4'd10, overs_low: 4'd6};
    drive(16'hC3A1, 0, 0, -1);
    check(got == 16'hC3A1 && n_oerr == 0 && n_ferr == 0, "16 bit, no parity, 2 stop");
    fmt = '{par_ena: 1'b1, odd: 1'b0, stop: 1'b0, tx_cnt: 1'b0, msg_length: 4'd7,
            overs_high: 4'd10, overs_low: 4'd6};
    drive(16'h005A, 0, 0, -1);
    check(got == 16'h005A && n_perr == 0, "7E1 5A");

    // false start: a low pulse shorter than half a bit
    n_start = 0; n_done = 0;
    @(negedge clk); line = 1'b0;
    repeat (20) @(negedge clk);
    line = 1'b1;
    repeat (3 * BT) @(negedge clk);
    check(n_start == 1 && n_done == 0 && !busy, "false start rejected");

    // disabled: nothing detected
    en = 1'b0; n_start = 0;
    @(negedge clk); line = 1'b0;
    repeat (BT) @(negedge clk);
    line = 1'b1;
    repeat (BT) @(negedge clk);
    check(n_start == 0 && !busy, "no reception while disabled");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
