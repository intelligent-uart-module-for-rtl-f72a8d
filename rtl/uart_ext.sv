// uart_ext: real-time UART extension module (top level).
//
// A UART merged with a timer, for time-triggered fieldbuses such as LIN and
// TTP/A on nodes clocked by imprecise RC oscillators. Three ideas set it apart
// from a standard UART:
//   * the baud rate is a 12.4 fixed-point clock divisor (EUBRS), so any clock
//     frequency gives a close baud rate, and the divider is restarted by the
//     send command, so a frame starts a fixed one cycle after it is ordered;
//   * it can find the baud rate itself from the LIN/TTP-A synchronization byte
//     (set SncE in the command register) and write EUBRS;
//   * an event (start bit, receive completion, timer match) can trigger an
//     assigned action (timestamp, timer reset, send, receive on/off) with
//     one cycle of latency and no processor involvement.
//
// Processor interface (the generic extension-module interface): base_i is
// compared with BASE_ADDR to select the module, addr_i picks one of eight
// 16-bit registers (see uart_regs), wr_i/rd_i with wdata_i/rdata_o replace the
// bidirectional data bus, irq_o is the interrupt line. Writes take effect on
// the clock edge that samples wr_i; rdata_o is combinational. wr_i and rd_i
// must not be high together (asserted).
// Bus interface: bus_rx_i is the bus level, bus_tx_o the level to drive ('1' is
// recessive, as on a wired-AND LIN or TTP/A bus).
//
// Block structure (register file, control unit, timing unit, enhanced baud
// rate generator, transmission unit, receive unit, error control unit, bus
// driver) follows the block diagram; the synchronization logic is a block of
// its own here. Port widths of BaseAddress and the split data bus are this
// design's choices.
module uart_ext
  import uart_pkg::*;
#(
  parameter int unsigned       BASE_W      = 8,
  parameter logic [BASE_W-1:0] BASE_ADDR   = '1,
  parameter logic [15:0]       EUBRS_RESET = 16'd26,
  parameter int unsigned       FILTER_LEN  = 4,
  parameter int unsigned       SYNC_SILENCE_CYC = 16
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic [BASE_W-1:0] base_i,
  input  logic [2:0]        addr_i,
  input  logic              wr_i,
  input  logic              rd_i,
  input  logic [15:0]       wdata_i,
  output logic [15:0]       rdata_o,
  output logic              irq_o,
  input  logic              bus_rx_i,
  output logic              bus_tx_o
);
  logic        sel;
  status_t     status;
  config_t     cfg;
  data0_t      data0;
  cmd_t        cmd;
  logic        cmd_new, srst, inta, msg_rd;
  logic [15:0] msg, tstm, eubrs, timer, timer_wdata, status_clr;
  logic        timer_wr, timer_match;
  logic        act_ts, act_trst, act_send, sync_start;
  logic        rx_mode, ovf, rbr, evf, sncr, intr, fss, rdy, busy, armed;
  logic        sync_clr, sync_active, sync_done;
  logic [15:0] sync_eubrs;
  logic        line;
  logic        tx_tick, rx_tick;
  logic        tx_run, tx_restart, tx_line, tx_busy, tx_done, tx_check, tx_check_bit;
  logic        rx_run, rx_restart, rx_busy, rx_start, rx_done;
  logic [15:0] rx_data;
  logic        rx_par_err, rx_frame_err, rx_ovs_err;
  logic        e_ovs, e_tr, e_par, e_ovf, e_any, e_new;
  logic        uart_en;

  assign sel     = (base_i == BASE_ADDR);
  assign uart_en = !fss && !sync_active;

  always_comb begin
    status         = '0;
    status.ovs_err = e_ovs;
    status.tr_err  = e_tr;
    status.par_err = e_par;
    status.evf     = evf;
    status.ovf     = e_ovf;
    status.rbr     = rbr;
    status.tbr     = !tx_busy;
    status.sncr    = sncr;
    status.loor    = cfg.loow;
    status.fss     = fss;
    status.busy    = busy;
    status.err     = e_any;
    status.rdy     = rdy;
    status.intr    = intr;
  end

  uart_regs #(.EUBRS_RESET(EUBRS_RESET)) u_regs (
    .clk_i, .rst_ni,
    .sel_i(sel), .addr_i, .wr_i, .rd_i, .wdata_i, .rdata_o,
    .status_i(status), .timer_i(timer),
    .tstm_wr_i(act_ts), .tstm_wdata_i(timer),
    .msg_wr_i(rx_done), .msg_wdata_i(rx_data),
    .eubrs_wr_i(sync_done), .eubrs_wdata_i(sync_eubrs),
    .cfg_o(cfg), .data0_o(data0), .cmd_o(cmd), .cmd_new_o(cmd_new),
    .msg_o(msg), .tstm_o(tstm), .eubrs_o(eubrs),
    .timer_wr_o(timer_wr), .timer_wdata_o(timer_wdata),
    .status_clr_o(status_clr), .msg_rd_o(msg_rd),
    .inta_o(inta), .srst_o(srst)
  );

  uart_ctrl u_ctrl (
    .clk_i, .rst_ni, .srst_i(srst),
    .cmd_i(cmd), .cmd_new_i(cmd_new), .cfg_i(cfg), .inta_i(inta),
    .status_clr_i(status_clr), .msg_rd_i(msg_rd),
    .rx_start_i(rx_start), .rx_done_i(rx_done), .timer_match_i(timer_match),
    .new_err_i(e_new), .sync_active_i(sync_active), .sync_done_i(sync_done),
    .tx_busy_i(tx_busy), .rx_busy_i(rx_busy),
    .act_timestamp_o(act_ts), .act_timer_rst_o(act_trst), .act_send_o(act_send),
    .sync_start_o(sync_start), .rx_mode_o(rx_mode), .ovf_o(ovf), .rbr_o(rbr),
    .evf_o(evf), .sncr_o(sncr), .int_o(intr), .irq_o, .fss_o(fss), .rdy_o(rdy),
    .busy_o(busy), .armed_o(armed)
  );

  uart_timer u_timer (
    .clk_i, .rst_ni, .srst_i(srst),
    .clr_i(act_trst || sync_clr), .wr_i(timer_wr), .wdata_i(timer_wdata),
    .tstm_i(tstm), .value_o(timer), .match_o(timer_match)
  );

  uart_sync #(.SILENCE_CYC(SYNC_SILENCE_CYC)) u_sync (
    .clk_i, .rst_ni, .srst_i(srst || fss),
    .start_i(sync_start), .line_i(line), .timer_i(timer),
    .timer_clr_o(sync_clr), .active_o(sync_active), .done_o(sync_done),
    .eubrs_o(sync_eubrs)
  );

  uart_ebrg u_ebrg (
    .clk_i, .rst_ni, .srst_i(srst), .eubrs_i(eubrs),
    .tx_run_i(tx_run), .tx_restart_i(tx_restart),
    .rx_run_i(rx_run), .rx_restart_i(rx_restart),
    .tx_tick_o(tx_tick), .rx_tick_o(rx_tick)
  );

  uart_tx u_tx (
    .clk_i, .rst_ni, .srst_i(srst), .enable_i(uart_en),
    .start_i(act_send), .data_i(msg), .fmt_i(data0), .tick_i(tx_tick),
    .baud_run_o(tx_run), .baud_restart_o(tx_restart), .line_o(tx_line),
    .busy_o(tx_busy), .done_o(tx_done), .check_o(tx_check), .check_bit_o(tx_check_bit)
  );

  uart_rx u_rx (
    .clk_i, .rst_ni, .srst_i(srst), .enable_i(rx_mode && uart_en),
    .line_i(line), .fmt_i(data0), .tick_i(rx_tick),
    .baud_run_o(rx_run), .baud_restart_o(rx_restart), .busy_o(rx_busy),
    .start_o(rx_start), .done_o(rx_done), .data_o(rx_data),
    .par_err_o(rx_par_err), .frame_err_o(rx_frame_err), .ovs_err_o(rx_ovs_err)
  );

  uart_err u_err (
    .clk_i, .rst_ni, .srst_i(srst),
    .ovs_err_i(rx_ovs_err), .frame_err_i(rx_frame_err), .par_err_i(rx_par_err),
    .ovf_i(ovf), .tx_check_i(tx_check), .tx_bit_i(tx_check_bit), .line_i(line),
    .clr_i({status_clr[15], status_clr[14], status_clr[13], status_clr[11]}),
    .ovs_err_o(e_ovs), .tr_err_o(e_tr), .par_err_o(e_par), .ovf_o(e_ovf),
    .err_o(e_any), .new_err_o(e_new)
  );

  uart_busdrv #(.FILTER_LEN(FILTER_LEN)) u_bus (
    .clk_i, .rst_ni, .bus_rx_i, .tx_line_i(tx_line), .drive_dis_i(cfg.outd || fss),
    .line_o(line), .bus_tx_o
  );

  a_no_rd_wr: assert property (@(posedge clk_i) disable iff (!rst_ni) !(wr_i && rd_i))
    else $error("uart_ext: wr_i and rd_i high together");
endmodule
