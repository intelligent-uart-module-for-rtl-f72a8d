// uart_busdrv: bus driver with input spike filter.
//
// Receive path: the bus input is brought into the clock domain by two flip-flops
// and then filtered: the filtered line only takes a new level after the
// synchronised input has shown that level for FILTER_LEN consecutive clock
// cycles, so pulses shorter than that never reach the receiver, the
// synchronization unit or the error control unit. Latency of a clean edge from
// bus_rx_i to line_o is 2 + FILTER_LEN cycles.
//
// Transmit path: bus_tx_o carries the transmitter's line, or the recessive level
// '1' when output is disabled (OUTD) or the module is in its fail-safe state.
//
// That the bus interface filters spikes is from the text; the filter type, its
// length and the recessive '1' on disable are this design's choices. The reset
// level of the line is '1' (idle bus).
module uart_busdrv #(
  parameter int unsigned FILTER_LEN = 4
) (
  input  logic clk_i,
  input  logic rst_ni,
  input  logic bus_rx_i,
  input  logic tx_line_i,
  input  logic drive_dis_i,
  output logic line_o,
  output logic bus_tx_o
);
  localparam int unsigned CW = $clog2(FILTER_LEN + 1);

  logic [1:0]    sync_q;
  logic [CW-1:0] cnt_q;
  logic          line_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      sync_q <= 2'b11;
      cnt_q  <= '0;
      line_q <= 1'b1;
    end else begin
      sync_q <= {sync_q[0], bus_rx_i};
      if (sync_q[1] == line_q) begin
        cnt_q <= '0;
      end else if (cnt_q == CW'(FILTER_LEN - 1)) begin
        cnt_q  <= '0;
        line_q <= sync_q[1];
      end else begin
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end

  assign line_o   = line_q;
  assign bus_tx_o = drive_dis_i ? 1'b1 : tx_line_i;
endmodule
