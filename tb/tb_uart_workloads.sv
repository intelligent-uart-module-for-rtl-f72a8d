// tb_uart_workloads: the module at the clock/baud combinations its description
// works with, end to end, at default parameters.
//
// The remote node's bit time is given in module clock cycles and may be
// fractional (its edges fall at round(i * cpb)). For each case the module
// synchronizes on the remote's synchronization byte, then receives three bytes
// from the remote and sends one back, which the remote samples in the middle of
// its own bit times. Checked per case: EUBRS equals round(round(8*cpb)/16),
// worked out here; the resulting bit time 2*EUBRS is within 2.5 % of the
// remote's; every byte arrives without error flags; the remote decodes the
// module's byte. The cases:
//   1 MHz clock, 19200 bit/s           cpb  52.083
//   the same clock drifted to 1.1 MHz  cpb  57.292  (first received with the
//                                      stale setting, which must go wrong, then
//                                      resynchronized)
//   4.9152 MHz, 19200 bit/s            cpb 256.000
//   5 MHz, 19200 bit/s                 cpb 260.417
//   42 MHz, 115200 bit/s               cpb 364.583
// The deviation of each case is printed.
module tb_uart_workloads;
  import uart_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] addr;
  logic wr, rd, irq, bus_tx, remote_tx, bus;
  logic [15:0] wdata, rdata;
  int checks = 0, failures = 0;

  uart_ext dut (.clk_i(clk), .rst_ni(rst_n), .base_i(8'hFF), .addr_i(addr), .wr_i(wr),
                .rd_i(rd), .wdata_i(wdata), .rdata_o(rdata), .irq_o(irq),
                .bus_rx_i(bus), .bus_tx_o(bus_tx));

  assign bus = bus_tx & remote_tx;
  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic write(reg_addr_e a, logic [15:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1'b1;
    @(negedge clk); wr = 1'b0;
  endtask

  task automatic read(reg_addr_e a, output logic [15:0] d);
    @(negedge clk); addr = a; rd = 1'b1;
    #1 d = rdata;
    @(negedge clk); rd = 1'b0;
  endtask

  function automatic logic [15:0] cmdw(event_e e, action_e a, bit snce);
    cmd_t c = '0;
    c.evs = e; c.asa = a; c.snce = snce;
    return c;
  endfunction

  // Drive 11 cells with fractional cell length cpb.
  task automatic drive_cells(bit cells[11], real cpb);
    int n;
    for (int i = 0; i < 11; i++) begin
      n = $rtoi((i + 1) * cpb + 0.5) - $rtoi(i * cpb + 0.5);
      for (int c = 0; c < n; c++) begin
        @(negedge clk);
        remote_tx = cells[i];
      end
    end
    @(negedge clk);
    remote_tx = 1'b1;
  endtask

  task automatic remote_byte(logic [7:0] d, real cpb);
    bit cells[11];
    bit p = 1'b1;
    cells[0] = 1'b0;
    for (int i = 0; i < 8; i++) begin cells[i + 1] = d[i]; p ^= d[i]; end
    cells[9] = p;
    cells[10] = 1'b1;
    drive_cells(cells, cpb);
  endtask

  task automatic remote_sync(real cpb);
    bit cells[11];
    for (int i = 0; i < 11; i++) cells[i] = (i < 9) ? i[0] : 1'b1;
    drive_cells(cells, cpb);
  endtask

  // Decode one frame from the module, sampling at the middle of the remote's cells.
  task automatic remote_recv(real cpb, output logic [7:0] d, output bit ok);
    int c, t;
    bit p;
    ok = 0; d = '0;
    for (c = 0; c < 100 && bus == 1'b1; c++) @(negedge clk);
    if (bus == 1'b1) return;
    t = 0;
    p = 1'b1;
    ok = 1;
    for (int i = 0; i < 11; i++) begin
      int mid = $rtoi((i + 0.5) * cpb);
      while (t < mid) begin @(negedge clk); t++; end
      if (i == 0 && bus != 1'b0) ok = 0;
      if (i >= 1 && i <= 8) begin d[i - 1] = bus; p ^= bus; end
      if (i == 9 && bus != p) ok = 0;
      if (i == 10 && bus != 1'b1) ok = 0;
    end
    repeat ($rtoi(cpb)) @(negedge clk);
  endtask

  task automatic run_case(string name, real cpb, bit stale_first);
    logic [15:0] e, st, v;
    int t8, exp_e;
    real dev;
    logic [7:0] got;
    bit ok;
    logic [7:0] bytes[3] = '{8'h55, 8'hC3, 8'h0F};
    if (stale_first) begin
      // receive with the setting left from the previous case: drift makes it fail
      write(REG_STATUS, 16'hFFFF);
      remote_byte(8'h55, cpb);
      repeat (100) @(negedge clk);
      read(REG_STATUS, st);
      read(REG_MSG, v);
      check(v[7:0] != 8'h55 || st[15:13] != 3'b0, $sformatf("%s: stale setting misreads (msg %h status %h)", name, v, st));
      write(REG_STATUS, 16'hFFFF);
      repeat (20 * $rtoi(cpb)) @(negedge clk);
    end
    write(REG_CMD, cmdw(EV_NONE, ACT_NONE, 1));
    repeat (40) @(negedge clk);
    remote_sync(cpb);
    repeat (20) @(negedge clk);
    read(REG_EUBRS, e);
    read(REG_STATUS, st);
    t8 = $rtoi(8 * cpb + 0.5);
    exp_e = (t8 + 8) / 16;
    dev = (2.0 * e - cpb) / cpb * 100.0;
    $display("%s: cycles/bit %0.3f EUBRS %0d bit %0d cycles deviation %0.2f %%", name, cpb, e, 2 * e, dev);
    check(st[8] && e == 16'(exp_e), $sformatf("%s: EUBRS %0d exp %0d", name, e, exp_e));
    check(dev < 2.5 && dev > -2.5, $sformatf("%s: deviation %0.2f %%", name, dev));
    write(REG_STATUS, 16'hFFFF);
    write(REG_CMD, cmdw(EV_NONE, ACT_RX_ENABLE, 0));
    foreach (bytes[i]) begin
      remote_byte(bytes[i], cpb);
      repeat (20) @(negedge clk);
      read(REG_STATUS, st);
      read(REG_MSG, v);
      check(st[15:13] == 3'b0 && !st[11] && v[7:0] == bytes[i], $sformatf("%s: byte %h received as %h, status %h",
            name, bytes[i], v[7:0], st));
      repeat ($rtoi(cpb)) @(negedge clk);
    end
    write(REG_CMD, cmdw(EV_NONE, ACT_RX_DIS, 0));
    write(REG_MSG, 16'h00A7);
    fork
      write(REG_CMD, cmdw(EV_NONE, ACT_SEND, 0));
      remote_recv(cpb, got, ok);
    join
    check(ok && got == 8'hA7, $sformatf("%s: remote decoded %h ok %b", name, got, ok));
    repeat (2 * $rtoi(cpb)) @(negedge clk);
    write(REG_CMD, cmdw(EV_NONE, ACT_RX_ENABLE, 0));
  endtask

  initial begin
    addr = '0; wr = 0; rd = 0; wdata = 0; remote_tx = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    run_case("1 MHz, 19200", 1.0e6 / 19200.0, 0);
    run_case("1.1 MHz, 19200", 1.1e6 / 19200.0, 1);
    run_case("4.9152 MHz, 19200", 4.9152e6 / 19200.0, 0);
    run_case("5 MHz, 19200", 5.0e6 / 19200.0, 0);
    run_case("42 MHz, 115200", 42.0e6 / 115200.0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
