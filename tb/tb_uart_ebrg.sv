// tb_uart_ebrg: self-checking test of the enhanced baud rate generator.
//
// For several EUBRS values (integer, fractional, and below the 16 floor) the
// channel is restarted and the cycle of every tick is compared with the ideal
// fixed-point schedule: tick k falls in cycle ceil(k*P/16) after the restart,
// P = max(EUBRS,16). The two channels run with different settings at once to
// show that they are independent, and a stopped channel must stay silent.
module tb_uart_ebrg;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] eubrs;
  logic tx_run, tx_restart, rx_run, rx_restart, tx_tick, rx_tick;
  int checks = 0, failures = 0;

  uart_ebrg dut (.clk_i(clk), .rst_ni(rst_n), .srst_i(1'b0), .eubrs_i(eubrs),
                 .tx_run_i(tx_run), .tx_restart_i(tx_restart),
                 .rx_run_i(rx_run), .rx_restart_i(rx_restart),
                 .tx_tick_o(tx_tick), .rx_tick_o(rx_tick));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ideal(int k, int p);
    return (k * p + 15) / 16;
  endfunction

  // Run one channel (0 = tx, 1 = rx) for nticks ticks and check every tick time.
  task automatic run_chan(int ch, logic [15:0] val, int nticks);
    int p, cyc, k, bad;
    p = (val < 16) ? 16 : int'(val);
    @(negedge clk);
    eubrs = val;
    if (ch == 0) begin tx_run = 1'b0; tx_restart = 1'b1; end
    else         begin rx_run = 1'b0; rx_restart = 1'b1; end
    @(negedge clk);
    if (ch == 0) begin tx_run = 1'b1; tx_restart = 1'b0; end
    else         begin rx_run = 1'b1; rx_restart = 1'b0; end
    cyc = 1; k = 0; bad = 0;
    #1;
    while (k < nticks) begin
      if ((ch == 0 ? tx_tick : rx_tick)) begin
        k++;
        if (cyc != ideal(k, p)) bad++;
      end else if (cyc > ideal(k + 1, p)) begin
        bad++;
        k = nticks;
      end
      @(negedge clk);
      #1;
      cyc++;
    end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL ch%0d eubrs=%0d: %0d tick times off", ch, val, bad);
    end
    if (ch == 0) tx_run = 1'b0; else rx_run = 1'b0;
  endtask

  initial begin
    eubrs = 16'd16; tx_run = 0; tx_restart = 0; rx_run = 0; rx_restart = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_chan(0, 16'd16, 64);    // one tick per cycle
    run_chan(0, 16'd26, 320);   // 1.625 cycles per sample
    run_chan(1, 16'd139, 320);  // 8.6875 cycles per sample
    run_chan(1, 16'd5, 40);     // below the floor: one per cycle
    run_chan(0, 16'd4095, 64);  // 255.9375 cycles per sample
    // Channels independent: rx runs at 48, tx at 40 simultaneously.
    begin
      int ct, cr, c;
      @(negedge clk);
      eubrs = 16'd48; rx_restart = 1'b1; tx_restart = 1'b0;
      @(negedge clk);
      rx_restart = 1'b0; rx_run = 1'b1; tx_run = 1'b0;
      ct = 0; cr = 0;
      for (c = 0; c < 300; c++) begin
        if (rx_tick) cr++;
        if (tx_tick) ct++;
        @(negedge clk);
      end
      checks++;
      if (cr != 100 || ct != 0) begin
        failures++;
        $display("FAIL independent: rx=%0d (100) tx=%0d (0)", cr, ct);
      end
      // a restart in the middle re-aligns the phase
      @(negedge clk); @(negedge clk);
      rx_restart = 1'b1;
      @(negedge clk);
      rx_restart = 1'b0;
      cr = 0;
      for (c = 1; c <= 3; c++) begin
        if (rx_tick && c != 3) cr++;
        @(negedge clk);
      end
      checks++;
      if (cr != 0) begin failures++; $display("FAIL restart phase"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
