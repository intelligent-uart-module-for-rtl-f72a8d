// uart_timer: timing unit.
//
// A free-running 16-bit timer that counts clock cycles and wraps. It is the time
// base for timestamps (the control unit copies its value into the TS/TM register),
// for the timer-match event (match_o is high while the timer equals TS/TM) and
// for the synchronization unit, which clears it at the first edge of the
// synchronization pattern and reads it at the following edges.
//
// Interface and timing: clr_i (timer-reset action or synchronization) sets the
// timer to 0 at the next clock edge; wr_i loads wdata_i from the processor; clr_i
// wins over wr_i, and either wins over counting. value_o is the register output.
//
// A timer merged into the UART, its register and its use for timestamps, timer
// match and synchronization follow the text. Counting every clock cycle with no
// prescaler, and the 16-bit width of the timer register, are this design's reading.
module uart_timer (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        srst_i,
  input  logic        clr_i,
  input  logic        wr_i,
  input  logic [15:0] wdata_i,
  input  logic [15:0] tstm_i,
  output logic [15:0] value_o,
  output logic        match_o
);
  logic [15:0] cnt_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)               cnt_q <= '0;
    else if (srst_i || clr_i)  cnt_q <= '0;
    else if (wr_i)             cnt_q <= wdata_i;
    else                       cnt_q <= cnt_q + 16'd1;
  end

  assign value_o = cnt_q;
  assign match_o = (cnt_q == tstm_i);
endmodule
