// uart_ctrl: UART control unit (events and assigned actions).
//
// The processor programs the UART by writing the command register: an event
// (EvS), an assigned action (AsA), interrupt enables (EI, ERRI) and the SncE
// flag. The write raises cmd_new_i for one cycle and the unit acts at the next
// clock edge, one cycle after the write:
//   SncE = 1           the synchronization unit is started (sync_start_o)
//   EvS = no event     the action is executed at once
//   EvS = other        the action is armed and executed at the clock edge that
//                      follows the event: start bit detected, receive
//                      completion, or timer equal to TS/TM
// An armed command runs once; a new command write replaces it. Actions are
// timestamp (TS/TM := timer), timer reset, start send, enable receive mode and
// disable receive mode; each executed action sets EvF and, with EI, INT.
// Action outputs are combinational pulses, so their effect lands on that edge.
//
// The unit also keeps the generic and UART status bits that are not errors:
// receive mode, RBR (set on receive completion, cleared by reading the message
// register; completion while RBR is set gives ovf_o), SncR (synchronization
// done), EvF, INT (event with EI or error with ERRI; cleared by INTA or by
// writing '1' to it), FSS (EFSS registered, one cycle after the write; it
// disarms commands, leaves receive mode and blocks new commands), RDY and BUSY.
// irq_o is INT unless interrupts are disabled (ID).
//
// Event and action codes, the one-cycle latencies and SncE follow the text. That
// an armed command fires once, the status bit rules, and what the fail-safe
// state does are this design's choices.
module uart_ctrl
  import uart_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        srst_i,
  input  cmd_t        cmd_i,
  input  logic        cmd_new_i,
  input  config_t     cfg_i,
  input  logic        inta_i,
  input  logic [15:0] status_clr_i,
  input  logic        msg_rd_i,
  input  logic        rx_start_i,
  input  logic        rx_done_i,
  input  logic        timer_match_i,
  input  logic        new_err_i,
  input  logic        sync_active_i,
  input  logic        sync_done_i,
  input  logic        tx_busy_i,
  input  logic        rx_busy_i,
  output logic        act_timestamp_o,
  output logic        act_timer_rst_o,
  output logic        act_send_o,
  output logic        sync_start_o,
  output logic        rx_mode_o,
  output logic        ovf_o,
  output logic        rbr_o,
  output logic        evf_o,
  output logic        sncr_o,
  output logic        int_o,
  output logic        irq_o,
  output logic        fss_o,
  output logic        rdy_o,
  output logic        busy_o,
  output logic        armed_o
);
  logic    fss_q, armed_q, rx_mode_q, rbr_q, evf_q, sncr_q, int_q;
  event_e  evs_q;
  action_e asa_q;

  logic    accept, fire_now, fire_armed, exec;
  action_e act;
  logic    ev_hit;

  always_comb begin
    unique case (evs_q)
      EV_START_BIT:   ev_hit = rx_start_i;
      EV_RX_COMPLETE: ev_hit = rx_done_i;
      EV_TIMER_MATCH: ev_hit = timer_match_i;
      default:        ev_hit = 1'b0;
    endcase
  end

  assign accept     = cmd_new_i && !fss_q && !srst_i;
  assign fire_now   = accept && !cmd_i.snce && cmd_i.evs == EV_NONE;
  assign fire_armed = armed_q && !cmd_new_i && !fss_q && !srst_i && ev_hit;
  assign exec       = fire_now || fire_armed;
  assign act        = fire_now ? cmd_i.asa : (fire_armed ? asa_q : ACT_NONE);

  assign act_timestamp_o = exec && act == ACT_TIMESTAMP;
  assign act_timer_rst_o = exec && act == ACT_TIMER_RST;
  assign act_send_o      = exec && act == ACT_SEND;
  assign sync_start_o    = accept && cmd_i.snce;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      fss_q     <= 1'b0;
      armed_q   <= 1'b0;
      evs_q     <= EV_NONE;
      asa_q     <= ACT_NONE;
      rx_mode_q <= 1'b0;
      rbr_q     <= 1'b0;
      evf_q     <= 1'b0;
      sncr_q    <= 1'b0;
      int_q     <= 1'b0;
    end else if (srst_i) begin
      fss_q     <= cfg_i.efss;
      armed_q   <= 1'b0;
      evs_q     <= EV_NONE;
      asa_q     <= ACT_NONE;
      rx_mode_q <= 1'b0;
      rbr_q     <= 1'b0;
      evf_q     <= 1'b0;
      sncr_q    <= 1'b0;
      int_q     <= 1'b0;
    end else begin
      fss_q <= cfg_i.efss;
      // command register
      if (cfg_i.efss) begin
        armed_q <= 1'b0;
      end else if (accept) begin
        armed_q <= !cmd_i.snce && cmd_i.evs != EV_NONE;
        evs_q   <= cmd_i.evs;
        asa_q   <= cmd_i.asa;
      end else if (fire_armed) begin
        armed_q <= 1'b0;
      end
      // receive mode
      if (cfg_i.efss)                   rx_mode_q <= 1'b0;
      else if (exec && act == ACT_RX_ENABLE) rx_mode_q <= 1'b1;
      else if (exec && act == ACT_RX_DIS)    rx_mode_q <= 1'b0;
      // receive buffer
      if (rx_done_i)     rbr_q <= 1'b1;
      else if (msg_rd_i) rbr_q <= 1'b0;
      // sticky flags, write '1' to clear; setting wins
      evf_q  <= (evf_q  && !status_clr_i[12]) || exec;
      sncr_q <= (sncr_q && !status_clr_i[8])  || sync_done_i;
      int_q  <= (int_q  && !status_clr_i[0] && !inta_i)
                || (exec && cmd_i.ei) || (new_err_i && cmd_i.erri);
    end
  end

  assign rx_mode_o = rx_mode_q;
  assign ovf_o     = rx_done_i && rbr_q;
  assign rbr_o     = rbr_q;
  assign evf_o     = evf_q;
  assign sncr_o    = sncr_q;
  assign int_o     = int_q;
  assign irq_o     = int_q && !cfg_i.id;
  assign fss_o     = fss_q;
  assign rdy_o     = !fss_q && !sync_active_i;
  assign busy_o    = tx_busy_i || rx_busy_i || sync_active_i;
  assign armed_o   = armed_q;
endmodule
