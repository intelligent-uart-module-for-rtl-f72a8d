// uart_err: error control unit.
//
// Watches the communication and keeps four sticky error flags for the status
// register:
//   ovs_err  a received bit fell between the OverS bounds (oversampling error)
//   tr_err   a received stop bit was '0', or, while sending, the bus read back at
//            the middle of a bit cell differed from the bit being sent
//   par_err  a received parity bit did not match
//   ovf      a message was received while the previous one was still unread
// A flag is set by its error pulse and cleared when the processor writes a '1' to
// it (clr_i, one bit per flag, same order as the outputs). A new error wins over a
// clear in the same cycle. new_err_o pulses (registered) in the cycle after any
// error was detected, for the error interrupt; err_o is the OR of the flags (the
// generic ERR status bit).
//
// That an error unit checks the bus and the transmitter and flags errors, and the
// four flag names, are from the text; which condition sets which flag, the bus
// read-back check and the write-one-to-clear rule are this design's choices.
module uart_err (
  input  logic       clk_i,
  input  logic       rst_ni,
  input  logic       srst_i,
  input  logic       ovs_err_i,
  input  logic       frame_err_i,
  input  logic       par_err_i,
  input  logic       ovf_i,
  input  logic       tx_check_i,
  input  logic       tx_bit_i,
  input  logic       line_i,
  input  logic [3:0] clr_i,        // {ovs, tr, par, ovf}
  output logic       ovs_err_o,
  output logic       tr_err_o,
  output logic       par_err_o,
  output logic       ovf_o,
  output logic       err_o,
  output logic       new_err_o
);
  logic [3:0] flags_q;
  logic [3:0] set;

  assign set = {ovs_err_i,
                frame_err_i || (tx_check_i && (tx_bit_i != line_i)),
                par_err_i,
                ovf_i};

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      flags_q   <= '0;
      new_err_o <= 1'b0;
    end else if (srst_i) begin
      flags_q   <= '0;
      new_err_o <= 1'b0;
    end else begin
      flags_q   <= (flags_q & ~clr_i) | set;
      new_err_o <= |set;
    end
  end

  assign {ovs_err_o, tr_err_o, par_err_o, ovf_o} = flags_q;
  assign err_o = |flags_q;
endmodule
