// tb_uart_timer: self-checking test of the timing unit.
//
// A reference counter in the testbench follows the same rules (clear, load,
// count by one, wrap at 16 bits); the timer value and the match output are
// compared with it every cycle while clears, loads and TS/TM values are applied
// at random.
module tb_uart_timer;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clr, wr, match;
  logic [15:0] wdata, tstm, value, ref_q;
  int checks = 0, failures = 0, n_match = 0;

  uart_timer dut (.clk_i(clk), .rst_ni(rst_n), .srst_i(1'b0), .clr_i(clr), .wr_i(wr),
                  .wdata_i(wdata), .tstm_i(tstm), .value_o(value), .match_o(match));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; wr = 0; wdata = 0; tstm = 16'd40;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    ref_q = 16'd0;
    for (int i = 0; i < 20000; i++) begin
      #1;
      checks++;
      if (value != ref_q || match != (ref_q == tstm)) begin
        failures++;
        if (failures < 5) $display("FAIL cycle %0d: value %h ref %h", i, value, ref_q);
      end
      if (match) n_match++;
      clr   = ($urandom_range(0, 99) == 0);
      wr    = ($urandom_range(0, 99) == 1);
      wdata = (i > 10000) ? 16'hFFF0 : 16'($urandom);
      if ($urandom_range(0, 199) == 0) tstm = 16'($urandom_range(0, 150));
      @(posedge clk);
      if (clr)     ref_q = 16'd0;
      else if (wr) ref_q = wdata;
      else         ref_q = ref_q + 16'd1;
      @(negedge clk);
    end
    checks++;
    if (n_match == 0) begin failures++; $display("FAIL no match seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
