// uart_rx: receive unit.
//
// While receive mode is enabled, a falling edge of the filtered bus line is taken
// as a start bit: the unit restarts its baud channel, pulses start_o (the "start
// bit detection" event) and then samples every bit cell 32 times. At the end of a
// cell the number of '1' samples (0..32) decides the bit: above 2*OverS_High it
// is '1', below 2*OverS_Low it is '0', anything in between is undefined, which
// raises ovs_err_o and takes the majority value. A start bit read as '1' is a
// false start and the unit returns to idle silently. After the data bits
// (LSB first), the optional parity bit and the one or two stop bits, done_o
// pulses (the "receive completion" event) with the word on data_o, together with
// par_err_o (parity mismatch) and frame_err_o (a stop bit read as '0').
//
// Timing: start_o and done_o are registered one-cycle pulses; start_o follows the
// clock edge that saw the falling edge, done_o the edge that ended the last stop
// bit. Frame format is taken from Data 0 when the start bit is seen.
//
// The 32 samples per cell and the two OverS bounds follow the text. Counting the
// '1' samples over the whole cell, scaling the 4-bit bounds by two and using the
// majority for an undefined bit are this design's choices.
module uart_rx
  import uart_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        srst_i,
  input  logic        enable_i,
  input  logic        line_i,
  input  data0_t      fmt_i,
  input  logic        tick_i,
  output logic        baud_run_o,
  output logic        baud_restart_o,
  output logic        busy_o,
  output logic        start_o,
  output logic        done_o,
  output logic [15:0] data_o,
  output logic        par_err_o,
  output logic        frame_err_o,
  output logic        ovs_err_o
);
  typedef enum logic [1:0] {ST_START, ST_DATA, ST_PAR, ST_STOP} cell_e;

  logic        prev_q;
  logic        busy_q;
  cell_e       cell_q;
  logic [4:0]  idx_q;       // data bit or stop bit index
  logic [4:0]  nbits_q;
  logic        par_ena_q, odd_q, two_stop_q;
  logic [3:0]  hi_q, lo_q;
  logic [4:0]  smp_q;
  logic [5:0]  ones_q;
  logic [15:0] data_q;
  logic        par_bad_q, frm_bad_q;

  logic        detect;
  logic        cell_end;
  logic [5:0]  ones_now;
  logic        is_one, is_zero, bit_val, undefined;
  logic        data_par;

  assign detect   = enable_i && !busy_q && prev_q && !line_i;
  assign cell_end = busy_q && tick_i && (smp_q == 5'd31);
  assign ones_now = ones_q + 6'(line_i);

  always_comb begin
    is_one    = ones_now > {1'b0, hi_q, 1'b0};
    is_zero   = ones_now < {1'b0, lo_q, 1'b0};
    undefined = !is_one && !is_zero;
    bit_val   = is_one ? 1'b1 : (is_zero ? 1'b0 : (ones_now >= 6'd16));
    data_par  = odd_q;
    for (int i = 0; i < 16; i++) begin
      if (i < int'(nbits_q)) data_par = data_par ^ data_q[i];
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      prev_q      <= 1'b1;
      busy_q      <= 1'b0;
      cell_q      <= ST_START;
      idx_q       <= '0;
      nbits_q     <= 5'd8;
      par_ena_q   <= 1'b0;
      odd_q       <= 1'b0;
      two_stop_q  <= 1'b0;
      hi_q        <= '0;
      lo_q        <= '0;
      smp_q       <= '0;
      ones_q      <= '0;
      data_q      <= '0;
      par_bad_q   <= 1'b0;
      frm_bad_q   <= 1'b0;
      start_o     <= 1'b0;
      done_o      <= 1'b0;
      data_o      <= '0;
      par_err_o   <= 1'b0;
      frame_err_o <= 1'b0;
      ovs_err_o   <= 1'b0;
    end else begin
      prev_q      <= line_i;
      start_o     <= 1'b0;
      done_o      <= 1'b0;
      par_err_o   <= 1'b0;
      frame_err_o <= 1'b0;
      ovs_err_o   <= 1'b0;
      if (srst_i || !enable_i) begin
        busy_q <= 1'b0;
      end else if (detect) begin
        busy_q     <= 1'b1;
        start_o    <= 1'b1;
        cell_q     <= ST_START;
        idx_q      <= '0;
        nbits_q    <= (fmt_i.msg_length == 4'd0) ? 5'd16 : {1'b0, fmt_i.msg_length};
        par_ena_q  <= fmt_i.par_ena;
        odd_q      <= fmt_i.odd;
        two_stop_q <= fmt_i.stop;
        hi_q       <= fmt_i.overs_high;
        lo_q       <= fmt_i.overs_low;
        smp_q      <= '0;
        ones_q     <= '0;
        data_q     <= '0;
        par_bad_q  <= 1'b0;
        frm_bad_q  <= 1'b0;
      end else if (busy_q && tick_i) begin
        smp_q  <= smp_q + 5'd1;
        ones_q <= cell_end ? 6'd0 : ones_now;
        if (cell_end) begin
          ovs_err_o <= undefined;
          unique case (cell_q)
            ST_START: begin
              if (bit_val) busy_q <= 1'b0;  // false start
              else begin
                cell_q <= ST_DATA;
                idx_q  <= '0;
              end
            end
            ST_DATA: begin
              data_q[idx_q[3:0]] <= bit_val;
              if (idx_q + 5'd1 == nbits_q) begin
                cell_q <= par_ena_q ? ST_PAR : ST_STOP;
                idx_q  <= '0;
              end else begin
                idx_q <= idx_q + 5'd1;
              end
            end
            ST_PAR: begin
              par_bad_q <= (bit_val != data_par);
              cell_q    <= ST_STOP;
              idx_q     <= '0;
            end
            ST_STOP: begin
              if (!bit_val) frm_bad_q <= 1'b1;
              if (idx_q == 5'(two_stop_q)) begin
                busy_q      <= 1'b0;
                done_o      <= 1'b1;
                data_o      <= data_q;
                par_err_o   <= par_bad_q;
                frame_err_o <= frm_bad_q || !bit_val;
              end else begin
                idx_q <= idx_q + 5'd1;
              end
            end
          endcase
        end
      end
    end
  end

  assign baud_run_o     = busy_q;
  assign baud_restart_o = detect;
  assign busy_o         = busy_q;
endmodule
