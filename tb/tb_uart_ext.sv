// tb_uart_ext: end-to-end test of the real-time UART extension module.
//
// The module is instantiated with its default parameters and connected to a
// wired-AND bus shared with a remote node modelled here (it sends frames bit by
// bit and decodes the module's frames by sampling each bit in its middle). The
// processor side is driven through the register interface. The run walks through
// every mechanism of the design and counts each one; a mechanism that never
// happened counts as a failure:
//   sync         baud rate found from the synchronization byte (EUBRS = 8*64/16)
//   send_now     send command, frame on the bus exactly one cycle after the write
//   rx           frames received into the message register (RBR)
//   start_ts     start-bit event with timestamp action, exact timestamp value
//   done_trst    receive-completion event with timer-reset action
//   match_send   timer-match event with send action, start exactly at the match
//   rx_disable   receive mode switched off by an action
//   par_err      parity error flagged, error interrupt (ERRI)
//   ovf          overflow: second frame before the first was read
//   ovs_err      oversampling error on a cell that is half '1', half '0'
//   tr_err       bus read-back mismatch while sending (collision)
//   spike        a 2-cycle glitch ignored by the bus filter
//   irq          interrupt line raised by an event (EI) and cleared with INTA
//   outd         output disable keeps the bus recessive during a send
//   fss          fail-safe state entered one cycle after EFSS, commands ignored
//   sres         software reset restores EUBRS and clears the flags
// Timing numbers used: the bus input reaches the receiver 2 + 4 cycles after it
// changes (synchronizer and spike filter), the start-bit event one cycle later,
// and an assigned action one cycle after its event.
module tb_uart_ext;
  import uart_pkg::*;
  localparam int BT = 64;          // remote bit time in cycles
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] base;
  logic [2:0] addr;
  logic wr, rd, irq, bus_tx, remote_tx, bus;
  logic [15:0] wdata, rdata;
  int checks = 0, failures = 0;
  longint cyc = 0;

  typedef enum int {M_SYNC, M_SEND_NOW, M_RX, M_START_TS, M_DONE_TRST, M_MATCH_SEND,
                    M_RX_DISABLE, M_PAR_ERR, M_OVF, M_OVS_ERR, M_TR_ERR, M_SPIKE, M_IRQ,
                    M_OUTD, M_FSS, M_SRES, M_COUNT} mech_e;
  int seen [M_COUNT];

  uart_ext dut (.clk_i(clk), .rst_ni(rst_n), .base_i(base), .addr_i(addr), .wr_i(wr),
                .rd_i(rd), .wdata_i(wdata), .rdata_o(rdata), .irq_o(irq),
                .bus_rx_i(bus), .bus_tx_o(bus_tx));

  assign bus = bus_tx & remote_tx;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // ---------------- processor side ----------------
  task automatic write(reg_addr_e a, logic [15:0] d);
    @(negedge clk);
    base = 8'hFF; addr = a; wdata = d; wr = 1'b1;
    @(negedge clk);
    wr = 1'b0;
  endtask

  task automatic read(reg_addr_e a, output logic [15:0] d);
    @(negedge clk);
    base = 8'hFF; addr = a; rd = 1'b1;
    #1 d = rdata;
    @(negedge clk);
    rd = 1'b0;
  endtask

  function automatic logic [15:0] cmdw(event_e e, action_e a, bit ei, bit erri, bit snce);
    cmd_t c = '0;
    c.evs = e; c.asa = a; c.ei = ei; c.erri = erri; c.snce = snce;
    return c;
  endfunction

  // ---------------- remote node ----------------
  // 8 data bits, odd parity (or flipped), one stop bit; split_cell is driven
  // half '0', half '1'. Returns the cycle of the start edge.
  task automatic remote_send(logic [7:0] d, bit bad_par, int split_cell, output longint t0);
    bit cells[$];
    bit p;
    cells.push_back(1'b0);
    p = 1'b1;
    for (int i = 0; i < 8; i++) begin cells.push_back(d[i]); p ^= d[i]; end
    cells.push_back(p ^ bad_par);
    cells.push_back(1'b1);
    foreach (cells[i]) begin
      for (int c = 0; c < BT; c++) begin
        @(negedge clk);
        if (i == 0 && c == 0) t0 = cyc;
        remote_tx = (i == split_cell) ? (c >= BT / 2) : cells[i];
      end
    end
    @(negedge clk);
    remote_tx = 1'b1;
  endtask

  task automatic remote_sync();
    for (int i = 0; i < 11; i++) begin
      for (int c = 0; c < BT; c++) begin
        @(negedge clk);
        remote_tx = (i < 9) ? i[0] : 1'b1;
      end
    end
  endtask

  // Wait for a falling edge of the bus (up to 'limit' cycles) and decode 11 cells.
  task automatic remote_recv(int limit, output longint t0, output logic [7:0] d,
                             output bit par_ok, output bit got);
    bit p;
    got = 0; par_ok = 0; d = '0; t0 = -1;
    for (int c = 0; c < limit && !got; c++) begin
      @(negedge clk);
      if (bus == 1'b0) begin got = 1; t0 = cyc; end
    end
    if (!got) return;
    repeat (BT / 2) @(negedge clk);
    check(bus == 1'b0, "remote sees the start bit");
    p = 1'b1;
    for (int i = 0; i < 8; i++) begin
      repeat (BT) @(negedge clk);
      d[i] = bus; p ^= bus;
    end
    repeat (BT) @(negedge clk);
    par_ok = (bus == p);
    repeat (BT) @(negedge clk);
    check(bus == 1'b1, "stop bit");
  endtask

  task automatic clear_all();
    logic [15:0] v;
    read(REG_MSG, v);
    write(REG_STATUS, 16'hFFFF);
    write(REG_CONFIG, 16'h0001);
  endtask

  initial begin
    logic [15:0] v, st, ts;
    longint t0, tw, tr;
    logic [7:0] d;
    bit pok, got;
    base = 8'h00; addr = '0; wr = 0; rd = 0; wdata = 0; remote_tx = 1'b1;
    foreach (seen[i]) seen[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);

    read(REG_STATUS, st);
    check(st[1] && st[9] && !st[3], $sformatf("ready and idle after reset (%h)", st));
    read(REG_EUBRS, v);
    check(v == 16'd26, "EUBRS reset value");

    // ---- synchronization ----
    write(REG_CMD, cmdw(EV_NONE, ACT_NONE, 0, 0, 1));
    read(REG_STATUS, st);
    check(!st[1] && st[3], "not ready, busy while synchronizing");
    repeat (50) @(negedge clk);
    remote_sync();
    repeat (20) @(negedge clk);
    read(REG_STATUS, st);
    read(REG_EUBRS, v);
    check(st[8] && st[1] && v == 16'(8 * BT / 16), $sformatf("sync: SncR %b EUBRS %0d", st[8], v));
    if (st[8] && v == 16'(8 * BT / 16)) seen[M_SYNC]++;

    // ---- send at once, no send jitter ----
    write(REG_MSG, 16'h00A5);
    fork
      write(REG_CMD, cmdw(EV_NONE, ACT_SEND, 0, 0, 0));
      remote_recv(50, t0, d, pok, got);
    join
    check(got && d == 8'hA5 && pok, $sformatf("remote got %h parity %b", d, pok));
    repeat (BT) @(negedge clk);
    begin
      // re-run with explicit timing: the line must be low exactly one cycle after the write edge
      @(negedge clk); base = 8'hFF; addr = REG_CMD; wdata = cmdw(EV_NONE, ACT_SEND, 0, 0, 0); wr = 1;
      @(negedge clk); wr = 0; tw = cyc;        // write sampled at the posedge that made cyc = tw
      check(bus_tx == 1'b1, "no start bit in the write cycle");
      @(negedge clk);
      check(bus_tx == 1'b0 && cyc == tw + 1, "start bit exactly one cycle after the write");
      if (bus_tx == 1'b0 && got && d == 8'hA5) seen[M_SEND_NOW]++;
      repeat (11 * BT + 10) @(negedge clk);
    end
    read(REG_STATUS, st);
    check(!st[14] && st[9], "no TrErr, transmitter ready again");

    // ---- receive with start-bit timestamp and event interrupt ----
    write(REG_CMD, cmdw(EV_NONE, ACT_RX_ENABLE, 0, 0, 0));
    write(REG_CMD, cmdw(EV_START_BIT, ACT_TIMESTAMP, 1, 0, 0));
    read(REG_TIMER, v); tr = cyc - 1;    // timer value v is seen at negedge cyc == tr
    remote_send(8'h3C, 0, -1, t0);
    repeat (30) @(negedge clk);
    read(REG_TSTM, ts);
    check(ts == 16'(v + (t0 + 7 - tr)), $sformatf("timestamp %0d exp %0d", ts, v + (t0 + 7 - tr)));
    if (ts == 16'(v + (t0 + 7 - tr))) seen[M_START_TS]++;
    check(irq, "event interrupt");
    read(REG_STATUS, st);
    check(st[10] && st[12] && st[0] && !st[13], $sformatf("RBR, EvF, INT (%h)", st));
    read(REG_MSG, v);
    check(v[7:0] == 8'h3C, $sformatf("message %h", v));
    if (v[7:0] == 8'h3C) seen[M_RX]++;
    write(REG_CONFIG, 16'h0001);         // INTA
    @(negedge clk);
    check(!irq, "INTA clears the interrupt");
    if (!irq) seen[M_IRQ]++;
    read(REG_STATUS, st);
    check(!st[10], "RBR cleared by reading the message");

    // ---- receive completion resets the timer ----
    write(REG_CMD, cmdw(EV_RX_COMPLETE, ACT_TIMER_RST, 0, 0, 0));
    remote_send(8'h81, 0, -1, t0);
    while (cyc < t0 + 712 + 40) @(negedge clk);
    @(negedge clk); base = 8'hFF; addr = REG_TIMER; rd = 1; #1 v = rdata;
    check(v == 16'(cyc - (t0 + 712)), $sformatf("timer %0d after completion reset (exp %0d)", v, cyc - (t0 + 712)));
    if (v == 16'(cyc - (t0 + 712))) seen[M_DONE_TRST]++;
    @(negedge clk); rd = 0;
    read(REG_MSG, v);
    check(v[7:0] == 8'h81, "second message");
    if (v[7:0] == 8'h81) seen[M_RX]++;

    // ---- timer match starts a send ----
    write(REG_MSG, 16'h00A5);
    read(REG_TIMER, v); tr = cyc - 1;
    write(REG_TSTM, v + 16'd300);
    write(REG_CMD, cmdw(EV_TIMER_MATCH, ACT_SEND, 0, 0, 0));
    remote_recv(400, t0, d, pok, got);
    check(got && t0 == tr + 301, $sformatf("send at match: start at %0d exp %0d", t0, tr + 301));
    check(d == 8'hA5 && pok, "frame sent on match");
    if (got && t0 == tr + 301) seen[M_MATCH_SEND]++;
    repeat (2 * BT) @(negedge clk);
    clear_all();                     // the module also heard its own frame

    // ---- parity error with error interrupt ----
    write(REG_CMD, cmdw(EV_NONE, ACT_NONE, 0, 1, 0));
    remote_send(8'h42, 1, -1, t0);
    repeat (20) @(negedge clk);
    read(REG_STATUS, st);
    check(st[13] && st[2] && irq, $sformatf("parity error, ERR, error interrupt (%h)", st));
    if (st[13] && irq) seen[M_PAR_ERR]++;
    clear_all();
    read(REG_STATUS, st);
    check(st[15:11] == 5'b0 && !st[2] && !st[0], $sformatf("flags cleared (%h)", st));

    // ---- overflow ----
    remote_send(8'h11, 0, -1, t0);
    repeat (20) @(negedge clk);
    remote_send(8'h22, 0, -1, t0);
    repeat (20) @(negedge clk);
    read(REG_STATUS, st);
    read(REG_MSG, v);
    check(st[11] && v[7:0] == 8'h22, $sformatf("overflow flagged (%h), newest kept", st));
    if (st[11]) seen[M_OVF]++;
    clear_all();

    // ---- oversampling error ----
    remote_send(8'hF0, 0, 2, t0);
    repeat (20) @(negedge clk);
    read(REG_STATUS, st);
    check(st[15], $sformatf("oversampling error (%h)", st));
    if (st[15]) seen[M_OVS_ERR]++;
    clear_all();

    // ---- spike filter ----
    @(negedge clk); remote_tx = 1'b0;
    repeat (2) @(negedge clk);
    remote_tx = 1'b1;
    repeat (3 * BT) @(negedge clk);
    read(REG_STATUS, st);
    check(!st[10] && !st[3] && st[15:11] == 5'b0, $sformatf("glitch ignored (%h)", st));
    if (!st[10] && !st[3]) seen[M_SPIKE]++;

    // ---- collision: remote holds the bus low while the module sends ----
    write(REG_CMD, cmdw(EV_NONE, ACT_RX_DIS, 0, 0, 0));
    write(REG_MSG, 16'h00FF);
    write(REG_CMD, cmdw(EV_NONE, ACT_SEND, 0, 0, 0));
    repeat (BT + BT / 2) @(negedge clk);
    remote_tx = 1'b0;
    repeat (BT) @(negedge clk);
    remote_tx = 1'b1;
    repeat (10 * BT) @(negedge clk);
    read(REG_STATUS, st);
    check(st[14] && !st[10], $sformatf("TrErr on read-back mismatch (%h)", st));
    if (st[14]) seen[M_TR_ERR]++;
    clear_all();

    // ---- receive mode off: nothing received ----
    remote_send(8'h77, 0, -1, t0);
    repeat (20) @(negedge clk);
    read(REG_STATUS, st);
    check(!st[10] && !st[3], "no reception with receive mode off");
    if (!st[10]) seen[M_RX_DISABLE]++;

    // ---- output disable ----
    write(REG_CONFIG, 16'h0008);
    write(REG_CMD, cmdw(EV_NONE, ACT_SEND, 0, 0, 0));
    begin
      int lows = 0;
      for (int c = 0; c < 11 * BT; c++) begin
        @(negedge clk);
        if (bus_tx == 1'b0) lows++;
      end
      read(REG_STATUS, st);
      check(lows == 0, "bus stays recessive with OUTD");
      if (lows == 0) seen[M_OUTD]++;
    end
    repeat (2 * BT) @(negedge clk);
    write(REG_CONFIG, 16'h0000);

    // ---- fail-safe state ----
    @(negedge clk); base = 8'hFF; addr = REG_CONFIG; wdata = 16'h0010; wr = 1;
    @(negedge clk); wr = 0;
    @(negedge clk);
    read(REG_STATUS, st);
    check(st[4] && !st[1], $sformatf("FSS entered (%h)", st));
    write(REG_CMD, cmdw(EV_NONE, ACT_SEND, 0, 0, 0));
    repeat (BT) @(negedge clk);
    read(REG_STATUS, st);
    check(st[9] && bus_tx, "send ignored in fail-safe state");
    write(REG_CONFIG, 16'h0000);
    @(negedge clk);
    read(REG_STATUS, st);
    check(!st[4] && st[1], "FSS left");
    if (!st[4]) seen[M_FSS]++;

    // ---- software reset ----
    write(REG_EUBRS, 16'd100);
    write(REG_STATUS, 16'h0000);
    write(REG_CONFIG, 16'h0004);
    @(negedge clk);
    read(REG_EUBRS, v);
    check(v == 16'd26, $sformatf("EUBRS back to reset value after SRES (%0d)", v));
    if (v == 16'd26) seen[M_SRES]++;

    // unselected accesses do nothing
    @(negedge clk); base = 8'h12; addr = REG_EUBRS; wdata = 16'd999; wr = 1;
    @(negedge clk); wr = 0;
    read(REG_EUBRS, v);
    check(v == 16'd26, "other base address ignored");

    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_e'(i));
      end
    end
    $display("mechanisms: sync=%0d send_now=%0d rx=%0d start_ts=%0d done_trst=%0d match_send=%0d",
             seen[M_SYNC], seen[M_SEND_NOW], seen[M_RX], seen[M_START_TS], seen[M_DONE_TRST],
             seen[M_MATCH_SEND]);
    $display("mechanisms: rx_disable=%0d par_err=%0d ovf=%0d ovs_err=%0d tr_err=%0d spike=%0d irq=%0d outd=%0d fss=%0d sres=%0d",
             seen[M_RX_DISABLE], seen[M_PAR_ERR], seen[M_OVF], seen[M_OVS_ERR], seen[M_TR_ERR],
             seen[M_SPIKE], seen[M_IRQ], seen[M_OUTD], seen[M_FSS], seen[M_SRES]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
