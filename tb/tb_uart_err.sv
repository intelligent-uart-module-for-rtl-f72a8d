// tb_uart_err: self-checking test of the error control unit.
//
// Applies each error source (oversampling, frame, parity, overflow, bus
// read-back mismatch) and checks that exactly its flag is set, that the flags
// are sticky, that writing '1' clears only the chosen flag, that a matching
// read-back sets nothing, and that new_err pulses once per detection.
module tb_uart_err;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ovs, frm, par, ovf, chk, bitv, line;
  logic [3:0] clr;
  logic f_ovs, f_tr, f_par, f_ovf, any, newe;
  int checks = 0, failures = 0;

  uart_err dut (.clk_i(clk), .rst_ni(rst_n), .srst_i(1'b0), .ovs_err_i(ovs),
                .frame_err_i(frm), .par_err_i(par), .ovf_i(ovf), .tx_check_i(chk),
                .tx_bit_i(bitv), .line_i(line), .clr_i(clr), .ovs_err_o(f_ovs),
                .tr_err_o(f_tr), .par_err_o(f_par), .ovf_o(f_ovf), .err_o(any),
                .new_err_o(newe));

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

  task automatic idle();
    {ovs, frm, par, ovf, chk} = '0; clr = '0;
  endtask

  // pulse one source, expect flags and new_err
  task automatic pulse(int src, logic [3:0] exp);
    @(negedge clk);
    case (src)
      0: ovs = 1; 1: frm = 1; 2: par = 1; 3: ovf = 1;
      4: begin chk = 1; bitv = 1; line = 0; end
      5: begin chk = 1; bitv = 0; line = 0; end
      default: ;
    endcase
    @(negedge clk);
    idle();
    check({f_ovs, f_tr, f_par, f_ovf} == exp, $sformatf("src %0d flags %b exp %b", src,
          {f_ovs, f_tr, f_par, f_ovf}, exp));
    check(newe == (src != 5), $sformatf("new_err after src %0d", src));
    @(negedge clk);
    check(!newe, "new_err is one pulse");
  endtask

  task automatic clear(logic [3:0] m, logic [3:0] exp);
    @(negedge clk); clr = m;
    @(negedge clk); clr = '0;
    check({f_ovs, f_tr, f_par, f_ovf} == exp, $sformatf("after clear %b: %b", m,
          {f_ovs, f_tr, f_par, f_ovf}));
  endtask

  initial begin
    idle(); bitv = 0; line = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!any, "clean after reset");
    pulse(5, 4'b0000);           // matching read-back
    pulse(0, 4'b1000);
    pulse(2, 4'b1010);
    clear(4'b1000, 4'b0010);
    pulse(1, 4'b0110);
    clear(4'b0110, 4'b0000);
    pulse(4, 4'b0100);           // read-back mismatch
    pulse(3, 4'b0101);
    check(any, "ERR is the OR of the flags");
    repeat (5) @(negedge clk);
    check({f_ovs, f_tr, f_par, f_ovf} == 4'b0101, "flags are sticky");
    // a new error wins over a clear in the same cycle
    @(negedge clk); clr = 4'b0001; ovf = 1;
    @(negedge clk); idle();
    check(f_ovf, "set wins over clear");
    clear(4'b1111, 4'b0000);
    check(!any, "all cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
