// uart_ebrg: enhanced baud rate generator.
//
// Produces the 32x oversampling ticks for the transmitter and the receiver from a
// fractional divisor. EUBRS is a 12.4 fixed-point number (12 integer bits, 4
// fraction bits) giving the sample period in clock cycles, so one bit cell lasts
// 32 * EUBRS/16 clock cycles. Each channel is a phase accumulator: every clock adds
// 16 (one clock period in 1/16 units); when the sum reaches EUBRS a tick is issued
// and EUBRS is subtracted, so the fraction is carried over instead of being rounded
// away and the average tick period is exactly EUBRS/16 cycles.
//
// The two channels are independent and each can be restarted: a restart clears the
// phase, so the first tick comes ceil(EUBRS/16) cycles after it. The transmitter
// restarts its channel on the send command, which is what removes send jitter; the
// receiver restarts its channel on the start-bit edge.
//
// Interface: eubrs_i is the register value; *_run_i enables a channel (when low it
// holds phase 0); *_restart_i clears the phase this cycle; *_tick_o is a one-cycle
// pulse. Values of EUBRS below 16 (less than one cycle per sample) are treated as
// 16. Fractional carry and restart behaviour follow the text; the accumulator form
// is this design's choice.
module uart_ebrg (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        srst_i,
  input  logic [15:0] eubrs_i,
  input  logic        tx_run_i,
  input  logic        tx_restart_i,
  input  logic        rx_run_i,
  input  logic        rx_restart_i,
  output logic        tx_tick_o,
  output logic        rx_tick_o
);
  logic [16:0] period;
  logic [16:0] acc_q   [2];
  logic [16:0] sum     [2];
  logic        run     [2];
  logic        restart [2];
  logic        tick    [2];

  assign period = (eubrs_i < 16'd16) ? 17'd16 : {1'b0, eubrs_i};

  assign run[0]     = tx_run_i;
  assign restart[0] = tx_restart_i;
  assign run[1]     = rx_run_i;
  assign restart[1] = rx_restart_i;

  for (genvar c = 0; c < 2; c++) begin : g_chan
    always_comb begin
      sum[c]  = acc_q[c] + 17'd16;
      tick[c] = run[c] && !restart[c] && (sum[c] >= period);
    end

    always_ff @(posedge clk_i or negedge rst_ni) begin
      if (!rst_ni) begin
        acc_q[c] <= '0;
      end else if (srst_i || restart[c] || !run[c]) begin
        acc_q[c] <= '0;
      end else if (tick[c]) begin
        acc_q[c] <= sum[c] - period;
      end else begin
        acc_q[c] <= sum[c];
      end
    end
  end

  assign tx_tick_o = tick[0];
  assign rx_tick_o = tick[1];
endmodule
