// uart_sync: synchronization unit (automatic baud rate detection).
//
// LIN and TTP/A begin a round with a synchronization byte: after a period of bus
// silence, a start bit and the data bits 1,0,1,0,1,0,1,0 (LSB first) make a line
// that toggles at every bit boundary for nine bit cells, followed by the parity
// and stop bits at '1'. When start_i arrives (command with SncE set), the unit
// waits for SILENCE_CYC cycles of '1' on the filtered line, then for a falling
// edge. On that first falling edge it clears the shared timer (timer_clr_o). At
// every following edge it measures the cell that just ended from the timer value
// and compares it with the cell before it; a difference of more than 1/TOL_DIV
// (4 %) of the earlier cell, or a timer wrap, rejects the pattern and the unit
// waits for silence again. A cell that grows past the tolerance is rejected as
// soon as it does, without waiting for its closing edge. The timer value at the fifth falling edge spans exactly
// eight bit cells (T8). At the ninth edge, the rising edge that ends the pattern,
// the unit pulses done_o and presents EUBRS = T8 / 16, rounded to the nearest
// integer, on eubrs_o.
//
// Why T8/16: EUBRS is the sample period in 1/16 clock cycles and a bit has 32
// samples, so EUBRS = 16 * (T8/8) / 32 = T8/16.
//
// Timing: timer_clr_o is combinational with the detected edge; done_o is a
// registered pulse one cycle after the ninth edge is seen. active_o is high from
// start_i until done (the UART's transmitter and receiver are held meanwhile).
//
// Resetting the timer at the first falling edge, comparing each bit time with the
// following one, the 4 % tolerance and EUBRS = timer/16 follow the text. The
// silence length, restarting after a rejected pattern and taking the timer at the
// fifth falling edge and rounding T8/16 are this design's choices.
module uart_sync #(
  parameter int unsigned SILENCE_CYC = 16,
  parameter int unsigned TOL_DIV     = 25
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        srst_i,
  input  logic        start_i,
  input  logic        line_i,
  input  logic [15:0] timer_i,
  output logic        timer_clr_o,
  output logic        active_o,
  output logic        done_o,
  output logic [15:0] eubrs_o
);
  typedef enum logic [1:0] {S_IDLE, S_SILENCE, S_WAIT_FALL, S_MEASURE} state_e;

  state_e      state_q;
  logic        prev_q;
  logic [15:0] quiet_q;
  logic [3:0]  edges_q;
  logic [15:0] last_q;
  logic [15:0] seg_prev_q;
  logic [15:0] t8_q;

  logic        edge_seen;
  logic [15:0] seg, diff;
  logic        in_tol;
  logic [19:0] t8_round;

  assign edge_seen = (line_i != prev_q);

  always_comb begin
    seg    = timer_i - last_q;
    diff   = (seg > seg_prev_q) ? (seg - seg_prev_q) : (seg_prev_q - seg);
    in_tol = (21'(diff) * 21'(TOL_DIV)) <= 21'(seg_prev_q);
    t8_round = 20'(t8_q) + 20'd8;   // T8/16, rounded to nearest
  end

  assign timer_clr_o = (state_q == S_WAIT_FALL) && edge_seen && !line_i && !start_i && !srst_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q    <= S_IDLE;
      prev_q     <= 1'b1;
      quiet_q    <= '0;
      edges_q    <= '0;
      last_q     <= '0;
      seg_prev_q <= '0;
      t8_q       <= '0;
      done_o     <= 1'b0;
      eubrs_o    <= '0;
    end else begin
      prev_q <= line_i;
      done_o <= 1'b0;
      if (srst_i) begin
        state_q <= S_IDLE;
      end else if (start_i) begin
        state_q <= S_SILENCE;
        quiet_q <= '0;
      end else begin
        unique case (state_q)
          S_IDLE: ;
          S_SILENCE: begin
            if (!line_i)                       quiet_q <= '0;
            else if (quiet_q + 16'd1 >= 16'(SILENCE_CYC)) state_q <= S_WAIT_FALL;
            else                               quiet_q <= quiet_q + 16'd1;
          end
          S_WAIT_FALL: begin
            if (edge_seen && !line_i) begin
              state_q <= S_MEASURE;
              edges_q <= '0;
              last_q  <= 16'hFFFF;  // timer reads 0 one cycle after this edge
            end
          end
          S_MEASURE: begin
            if (timer_i == 16'hFFFF || (edges_q != 4'd0 && seg > seg_prev_q && !in_tol)) begin
              // timer wrap, or the current cell already exceeds the tolerance
              state_q <= S_SILENCE;
              quiet_q <= '0;
            end else if (edge_seen) begin
              edges_q    <= edges_q + 4'd1;
              last_q     <= timer_i;
              seg_prev_q <= seg;
              if (edges_q != 4'd0 && !in_tol) begin
                state_q <= S_SILENCE;
                quiet_q <= '0;
              end else if (edges_q == 4'd7) begin
                t8_q <= timer_i + 16'd1;
              end else if (edges_q == 4'd8) begin
                state_q <= S_IDLE;
                done_o  <= 1'b1;
                eubrs_o <= t8_round[19:4];
              end
            end
          end
        endcase
      end
    end
  end

  assign active_o = (state_q != S_IDLE);
endmodule
