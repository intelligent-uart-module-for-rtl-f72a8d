// tb_uart_ctrl: self-checking test of the UART control unit.
//
// Drives the command strobe and the event inputs directly and checks, cycle by
// cycle: immediate actions in the cycle after the command write for every
// action code; armed commands for each event, executed once in the cycle of the
// event; replacement of an armed command; SncE starting synchronization; EvF,
// INT with EI and ERRI, INTA and write-one-to-clear; RBR, overflow and SncR;
// the fail-safe state blocking commands; RDY and BUSY.
module tb_uart_ctrl;
  import uart_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  cmd_t cmd; config_t cfg;
  logic cmd_new, inta, msg_rd, rx_start, rx_done, tmatch, new_err, s_act, s_done, txb, rxb;
  logic [15:0] sclr;
  logic a_ts, a_trst, a_send, s_start, rx_mode, ovf, rbr, evf, sncr, intr, irq, fss, rdy, busy, armed;
  int checks = 0, failures = 0;

  uart_ctrl dut (.clk_i(clk), .rst_ni(rst_n), .srst_i(1'b0), .cmd_i(cmd), .cmd_new_i(cmd_new),
    .cfg_i(cfg), .inta_i(inta), .status_clr_i(sclr), .msg_rd_i(msg_rd), .rx_start_i(rx_start),
    .rx_done_i(rx_done), .timer_match_i(tmatch), .new_err_i(new_err), .sync_active_i(s_act),
    .sync_done_i(s_done), .tx_busy_i(txb), .rx_busy_i(rxb), .act_timestamp_o(a_ts),
    .act_timer_rst_o(a_trst), .act_send_o(a_send), .sync_start_o(s_start), .rx_mode_o(rx_mode),
    .ovf_o(ovf), .rbr_o(rbr), .evf_o(evf), .sncr_o(sncr), .int_o(intr), .irq_o(irq),
    .fss_o(fss), .rdy_o(rdy), .busy_o(busy), .armed_o(armed));

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

  function automatic cmd_t mk(event_e e, action_e a, bit ei, bit erri, bit snce);
    cmd_t c = '0;
    c.evs = e; c.asa = a; c.ei = ei; c.erri = erri; c.snce = snce;
    return c;
  endfunction

  // the action outputs as a 3-bit vector {send, trst, ts}
  function automatic logic [2:0] acts();
    return {a_send, a_trst, a_ts};
  endfunction

  task automatic issue(cmd_t c);
    @(negedge clk);
    cmd = c; cmd_new = 1'b1; #1;
  endtask

  task automatic clear_evf();
    @(negedge clk); sclr = 16'h1000;
    @(negedge clk); sclr = 16'h0;
  endtask

  initial begin
    cmd = '0; cfg = '0; cmd_new = 0; inta = 0; msg_rd = 0; rx_start = 0; rx_done = 0;
    tmatch = 0; new_err = 0; s_act = 0; s_done = 0; txb = 0; rxb = 0; sclr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(rdy && !busy && !evf && !intr && !fss, "reset state");

    // immediate actions
    issue(mk(EV_NONE, ACT_TIMESTAMP, 0, 0, 0)); check(acts() == 3'b001, "timestamp now");
    @(negedge clk); cmd_new = 0; #1; check(acts() == 3'b000 && evf, "one cycle, EvF set");
    clear_evf(); check(!evf, "EvF cleared by writing 1");
    issue(mk(EV_NONE, ACT_TIMER_RST, 0, 0, 0)); check(acts() == 3'b010, "timer reset now");
    @(negedge clk); cmd_new = 0;
    issue(mk(EV_NONE, ACT_SEND, 0, 0, 0)); check(acts() == 3'b100, "send now");
    @(negedge clk); cmd_new = 0;
    issue(mk(EV_NONE, ACT_RX_ENABLE, 0, 0, 0)); check(!rx_mode, "rx mode not yet");
    @(negedge clk); cmd_new = 0; check(rx_mode, "rx mode on");
    issue(mk(EV_NONE, ACT_RX_DIS, 0, 0, 0));
    @(negedge clk); cmd_new = 0; check(!rx_mode, "rx mode off");
    issue(mk(EV_NONE, ACT_NONE, 0, 0, 0)); check(acts() == 3'b000, "no action code");
    @(negedge clk); cmd_new = 0;

    // armed: start bit -> timestamp, with EI
    clear_evf();
    issue(mk(EV_START_BIT, ACT_TIMESTAMP, 1, 0, 0)); check(acts() == 3'b000, "armed, not run");
    @(negedge clk); cmd_new = 0; check(armed && !evf, "armed");
    repeat (5) @(negedge clk);
    check(acts() == 3'b000, "waits for the event");
    rx_start = 1; #1; check(acts() == 3'b001, "timestamp in the event cycle");
    @(negedge clk); rx_start = 0; #1;
    check(!armed && evf && intr && irq, "fired once, EvF and INT");
    rx_start = 1; #1; check(acts() == 3'b000, "does not fire twice");
    @(negedge clk); rx_start = 0;
    cfg.id = 1; #1; check(!irq && intr, "ID masks the line");
    cfg.id = 0;
    @(negedge clk); inta = 1; @(negedge clk); inta = 0; check(!intr, "INTA clears INT");

    // receive completion -> timer reset
    issue(mk(EV_RX_COMPLETE, ACT_TIMER_RST, 0, 0, 0));
    @(negedge clk); cmd_new = 0;
    rx_done = 1; #1; check(acts() == 3'b010, "timer reset on completion");
    @(negedge clk); rx_done = 0; check(rbr && !intr, "RBR set, no INT without EI");
    rx_done = 1; #1; check(ovf, "overflow when RBR still set");
    @(negedge clk); rx_done = 0;
    msg_rd = 1; @(negedge clk); msg_rd = 0; check(!rbr, "RBR cleared by reading");

    // timer match -> send; replaced before it fires
    issue(mk(EV_TIMER_MATCH, ACT_SEND, 0, 0, 0));
    @(negedge clk); cmd_new = 0;
    issue(mk(EV_TIMER_MATCH, ACT_RX_ENABLE, 0, 0, 0));
    @(negedge clk); cmd_new = 0;
    tmatch = 1; #1; check(acts() == 3'b000, "replaced command does not send");
    @(negedge clk); tmatch = 0; check(rx_mode, "replacement ran on match");
    issue(mk(EV_TIMER_MATCH, ACT_SEND, 0, 0, 0));
    @(negedge clk); cmd_new = 0;
    tmatch = 1; #1; check(acts() == 3'b100, "send on timer match");
    @(negedge clk); tmatch = 0;

    // synchronization
    issue(mk(EV_NONE, ACT_SEND, 0, 0, 1)); check(s_start && acts() == 3'b000, "SncE starts sync only");
    @(negedge clk); cmd_new = 0; s_act = 1; #1; check(!rdy && busy, "not ready while synchronizing");
    @(negedge clk); s_act = 0; s_done = 1; @(negedge clk); s_done = 0;
    check(sncr && rdy, "SncR set");
    sclr = 16'h0100; @(negedge clk); sclr = 0; check(!sncr, "SncR cleared");

    // error interrupt
    issue(mk(EV_NONE, ACT_NONE, 0, 1, 0)); @(negedge clk); cmd_new = 0;
    new_err = 1; @(negedge clk); new_err = 0; check(intr, "INT on error with ERRI");
    sclr = 16'h0001; @(negedge clk); sclr = 0; check(!intr, "INT cleared by writing 1");

    // fail-safe state
    issue(mk(EV_START_BIT, ACT_SEND, 0, 0, 0)); @(negedge clk); cmd_new = 0;
    cfg.efss = 1; @(negedge clk); #1;
    check(fss && !rdy && !rx_mode, "FSS one cycle after EFSS");
    @(negedge clk); check(!armed, "disarmed in FSS");
    issue(mk(EV_NONE, ACT_SEND, 0, 0, 0)); check(acts() == 3'b000, "commands ignored in FSS");
    @(negedge clk); cmd_new = 0; cfg.efss = 0;
    @(negedge clk); txb = 1; #1; check(busy && !fss, "busy with transmitter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
