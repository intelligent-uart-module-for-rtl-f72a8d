// tb_uart_busdrv: self-checking test of the bus driver and its spike filter.
//
// With FILTER_LEN = 4, pulses of 1 to 3 cycles must not reach the filtered line,
// pulses of 4 or more cycles must, each edge exactly 2 + 4 cycles after it was
// applied. The transmit side must follow the transmitter and show '1' while
// driving is disabled.
module tb_uart_busdrv;
  localparam int FL = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rx, tx_line, dis, line, tx;
  int checks = 0, failures = 0;

  uart_busdrv #(.FILTER_LEN(FL)) dut (.clk_i(clk), .rst_ni(rst_n), .bus_rx_i(rx),
    .tx_line_i(tx_line), .drive_dis_i(dis), .line_o(line), .bus_tx_o(tx));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Apply a pulse of 'len' cycles at level 'lvl' from the opposite idle level.
  task automatic pulse(bit lvl, int len);
    int seen_at, c;
    seen_at = -1;
    @(negedge clk); rx = lvl;
    for (c = 1; c <= len + 2 * FL + 4; c++) begin
      @(negedge clk);
      if (c == len) rx = !lvl;
      if (seen_at < 0 && line == lvl) seen_at = c;
    end
    if (len < FL) check(seen_at < 0, $sformatf("%0d-cycle spike filtered", len));
    else          check(seen_at == 2 + FL, $sformatf("%0d-cycle pulse seen at %0d", len, seen_at));
    check(line == !lvl, "line back to idle level");
  endtask

  initial begin
    rx = 1'b1; tx_line = 1'b1; dis = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    check(line == 1'b1, "idle high");
    for (int len = 1; len <= 8; len++) pulse(1'b0, len);
    rx = 1'b0;
    repeat (12) @(negedge clk);
    check(line == 1'b0, "steady low");
    for (int len = 1; len <= 6; len++) pulse(1'b1, len);
    rx = 1'b1;
    repeat (12) @(negedge clk);
    tx_line = 1'b0; #1;
    check(tx == 1'b0, "transmitter drives the bus");
    dis = 1'b1; #1;
    check(tx == 1'b1, "recessive while disabled");
    dis = 1'b0; tx_line = 1'b1; #1;
    check(tx == 1'b1, "idle transmitter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
