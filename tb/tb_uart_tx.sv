// tb_uart_tx: self-checking test of the transmission unit.
//
// The unit is driven by a baud rate generator set to EUBRS = 32 (two cycles per
// sample, 64 cycles per bit). For several frame formats the expected frame
// (start, data LSB first, parity, stop bits) is built here and the line is
// checked in the middle of every cell, counted in clock cycles from the edge that
// accepted the send; the start bit must be on the line right after that edge.
// Also checked: busy and done timing, the mid-bit check strobes, a send while
// busy being ignored, and an abort by enable.
module tb_uart_tx;
  import uart_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en, start, tick, run, restart, line, busy, done, chk, chk_bit;
  logic [15:0] data;
  data0_t fmt;
  int checks = 0, failures = 0;
  int nchk, ndone;

  uart_ebrg u_brg (.clk_i(clk), .rst_ni(rst_n), .srst_i(1'b0), .eubrs_i(16'd32),
                   .tx_run_i(run), .tx_restart_i(restart), .rx_run_i(1'b0),
                   .rx_restart_i(1'b0), .tx_tick_o(tick), .rx_tick_o());
  uart_tx dut (.clk_i(clk), .rst_ni(rst_n), .srst_i(1'b0), .enable_i(en),
               .start_i(start), .data_i(data), .fmt_i(fmt), .tick_i(tick),
               .baud_run_o(run), .baud_restart_o(restart), .line_o(line),
               .busy_o(busy), .done_o(done), .check_o(chk), .check_bit_o(chk_bit));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (chk) nchk++;
    if (done) ndone++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send_frame(logic [15:0] d, bit par, bit odd, bit two, int len4, bit extra_start);
    bit exp[$];
    int n, p;
    n = (len4 == 0) ? 16 : len4;
    exp.push_back(1'b0);
    p = odd;
    for (int i = 0; i < n; i++) begin exp.push_back(d[i]); p ^= d[i]; end
    if (par) exp.push_back(p[0]);
    exp.push_back(1'b1);
    if (two) exp.push_back(1'b1);
    @(negedge clk);
    data = d;
    fmt = '{par_ena: par, odd: odd, stop: two, tx_cnt: 1'b0, msg_length: 4'(len4),
            overs_high: 4'd10, overs_low: 4'd6};
    start = 1'b1;
    nchk = 0; ndone = 0;
    @(posedge clk);           // accepting edge
    #1 start = 1'b0;
    check(line == 1'b0 && busy, "start bit right after the send edge");
    for (int c = 1; c <= 64 * exp.size(); c++) begin
      @(posedge clk);
      #1;
      if (c % 64 == 32) check(line == exp[c / 64], $sformatf("bit %0d of %h", c / 64, d));
      if (extra_start && c == 100) begin
        start = 1'b1; data = ~d;
      end else start = 1'b0;
      if (c == 64 * exp.size() - 1) check(busy, "busy until the last cell ends");
    end
    check(!busy && line, "idle after the frame");
    check(ndone == 1, "one done pulse");
    check(nchk == exp.size(), $sformatf("check strobes %0d", nchk));
  endtask

  initial begin
    en = 1'b1; start = 1'b0; data = '0; fmt = DATA0_RESET;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    check(line == 1'b1 && !busy, "idle after reset");
    send_frame(16'h00A5, 1, 1, 0, 8, 0);
    send_frame(16'h003C, 1, 0, 0, 8, 1);   // second send while busy is ignored
    send_frame(16'h0055, 0, 0, 1, 7, 0);
    send_frame(16'hBEEF, 0, 0, 0, 0, 0);   // length code 0: 16 data bits
    send_frame(16'h0013, 1, 1, 1, 5, 0);
    // abort by enable
    @(negedge clk);
    data = 16'h0000; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (40) @(negedge clk);
    en = 1'b0;
    @(negedge clk);
    check(!busy && line, "abort on enable low");
    en = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
