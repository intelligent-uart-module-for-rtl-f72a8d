// uart_tx: transmission unit.
//
// Sends one frame: a start bit ('0'), MsgLength data bits LSB first, an optional
// parity bit (odd or even), then one or two stop bits ('1'). The frame is built
// from the message register and Data 0 when the send action arrives, so later
// register writes do not disturb a frame in flight.
//
// Timing: the start bit goes on the line at the clock edge that accepts start_i,
// and the baud channel is restarted on that same edge (baud_restart_o), so the
// frame starts a fixed one cycle after the action and not at the next tick of a
// free-running divider. Every bit cell lasts 32 sample ticks. At the 16th tick of
// each cell check_o pulses with the bit being sent (check_bit_o) so the error
// control unit can compare it with the bus. done_o pulses when the last stop bit
// ends. A start_i while busy is ignored; enable_i low (fail-safe state or
// synchronization) aborts a frame and leaves the line at '1'.
//
// Frame format and message length come from the register description; a length
// code of 0 meaning 16 bits, and ignoring a send while busy, are this design's own.
module uart_tx
  import uart_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        srst_i,
  input  logic        enable_i,
  input  logic        start_i,
  input  logic [15:0] data_i,
  input  data0_t      fmt_i,
  input  logic        tick_i,
  output logic        baud_run_o,
  output logic        baud_restart_o,
  output logic        line_o,
  output logic        busy_o,
  output logic        done_o,
  output logic        check_o,
  output logic        check_bit_o
);
  logic [18:0] frame;      // bits that follow the start bit, LSB first
  logic [4:0]  nbits;      // data bits
  logic [4:0]  nframe;     // bits that follow the start bit
  logic        parity;

  logic [18:0] sh_q;
  logic [4:0]  left_q;
  logic [4:0]  smp_q;
  logic        busy_q, line_q;
  logic        accept;

  always_comb begin
    nbits  = (fmt_i.msg_length == 4'd0) ? 5'd16 : {1'b0, fmt_i.msg_length};
    frame  = '1;
    parity = fmt_i.odd;
    for (int i = 0; i < 16; i++) begin
      if (i < int'(nbits)) begin
        frame[i] = data_i[i];
        parity   = parity ^ data_i[i];
      end
    end
    if (fmt_i.par_ena) frame[nbits] = parity;
    nframe = nbits + 5'(fmt_i.par_ena) + 5'd1 + 5'(fmt_i.stop);
  end

  assign accept = start_i && enable_i && !busy_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      busy_q <= 1'b0;
      line_q <= 1'b1;
      sh_q   <= '1;
      left_q <= '0;
      smp_q  <= '0;
    end else if (srst_i || !enable_i) begin
      busy_q <= 1'b0;
      line_q <= 1'b1;
      sh_q   <= '1;
      left_q <= '0;
      smp_q  <= '0;
    end else if (accept) begin
      busy_q <= 1'b1;
      line_q <= 1'b0;
      sh_q   <= frame;
      left_q <= nframe;
      smp_q  <= '0;
    end else if (busy_q && tick_i) begin
      smp_q <= smp_q + 5'd1;
      if (smp_q == 5'd31) begin
        if (left_q == '0) begin
          busy_q <= 1'b0;
          line_q <= 1'b1;
        end else begin
          line_q <= sh_q[0];
          sh_q   <= {1'b1, sh_q[18:1]};
          left_q <= left_q - 5'd1;
        end
      end
    end
  end

  assign baud_run_o     = busy_q;
  assign baud_restart_o = accept;
  assign line_o         = line_q;
  assign busy_o         = busy_q;
  assign done_o         = busy_q && tick_i && (smp_q == 5'd31) && (left_q == '0);
  assign check_o        = busy_q && tick_i && (smp_q == 5'd15);
  assign check_bit_o    = line_q;
endmodule
