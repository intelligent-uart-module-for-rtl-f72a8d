// tb_uart_regs: self-checking test of the interface register file.
//
// Checks reset values, write and read-back of every register, that writes are
// ignored when the module is not selected, the one-cycle command strobe, the
// pass-through of timer and status accesses, the message-read strobe, the
// self-clearing INTA and SRES bits with the software reset they cause, and that
// a hardware write wins over a processor write in the same cycle.
module tb_uart_regs;
  import uart_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sel, wr, rd;
  logic [2:0] addr;
  logic [15:0] wdata, rdata, timer, tstm_wd, msg_wd, eubrs_wd;
  logic tstm_wr, msg_wr, eubrs_wr;
  status_t status;
  config_t cfg; data0_t d0; cmd_t cmd;
  logic cmd_new, timer_wr, msg_rd, inta, srst;
  logic [15:0] msg, tstm, eubrs, timer_wdata, status_clr;
  int checks = 0, failures = 0;

  uart_regs dut (.clk_i(clk), .rst_ni(rst_n), .sel_i(sel), .addr_i(addr), .wr_i(wr),
    .rd_i(rd), .wdata_i(wdata), .rdata_o(rdata), .status_i(status), .timer_i(timer),
    .tstm_wr_i(tstm_wr), .tstm_wdata_i(tstm_wd), .msg_wr_i(msg_wr), .msg_wdata_i(msg_wd),
    .eubrs_wr_i(eubrs_wr), .eubrs_wdata_i(eubrs_wd), .cfg_o(cfg), .data0_o(d0),
    .cmd_o(cmd), .cmd_new_o(cmd_new), .msg_o(msg), .tstm_o(tstm), .eubrs_o(eubrs),
    .timer_wr_o(timer_wr), .timer_wdata_o(timer_wdata), .status_clr_o(status_clr),
    .msg_rd_o(msg_rd), .inta_o(inta), .srst_o(srst));

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

  task automatic write(logic [2:0] a, logic [15:0] d);
    @(negedge clk);
    sel = 1; addr = a; wdata = d; wr = 1; rd = 0;
    @(negedge clk);
    wr = 0;
  endtask

  task automatic read(logic [2:0] a, output logic [15:0] d);
    @(negedge clk);
    sel = 1; addr = a; rd = 1; wr = 0;
    #1 d = rdata;
    @(negedge clk);
    rd = 0;
  endtask

  initial begin
    logic [15:0] v;
    sel = 0; wr = 0; rd = 0; addr = 0; wdata = 0; timer = 16'h1234;
    tstm_wr = 0; msg_wr = 0; eubrs_wr = 0; tstm_wd = 0; msg_wd = 0; eubrs_wd = 0;
    status = status_t'(16'hA5C3);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    read(REG_DATA0, v); check(v == 16'hC8A6, $sformatf("data0 reset %h", v));
    read(REG_EUBRS, v); check(v == 16'd26, "eubrs reset");
    read(REG_CMD, v);   check(v == 16'd0, "cmd reset");
    read(REG_STATUS, v); check(v == 16'hA5C3, "status pass-through");
    read(REG_TIMER, v);  check(v == 16'h1234, "timer pass-through");
    write(REG_DATA0, 16'h1234); read(REG_DATA0, v); check(v == 16'h1234 && d0 == 16'h1234, "data0 rw");
    write(REG_MSG, 16'hBEEF);   read(REG_MSG, v);   check(v == 16'hBEEF && msg == 16'hBEEF, "msg rw");
    write(REG_TSTM, 16'h0F0F);  read(REG_TSTM, v);  check(v == 16'h0F0F && tstm == 16'h0F0F, "tstm rw");
    write(REG_EUBRS, 16'h0123); read(REG_EUBRS, v); check(v == 16'h0123 && eubrs == 16'h0123, "eubrs rw");
    write(REG_CONFIG, 16'h0098); read(REG_CONFIG, v); check(v == 16'h0098 && cfg.efss && cfg.outd, "config rw");
    // not selected: no write, reads 0
    @(negedge clk); sel = 0; addr = REG_MSG; wdata = 16'h5555; wr = 1;
    @(negedge clk); wr = 0; rd = 1; #1;
    check(msg == 16'hBEEF && rdata == 16'h0, "unselected access ignored");
    @(negedge clk); rd = 0;
    // command strobe: high exactly the cycle after the write
    @(negedge clk); sel = 1; addr = REG_CMD; wdata = 16'h00DB; wr = 1;
    #1 check(!cmd_new, "no strobe during the write cycle");
    @(negedge clk); wr = 0;
    check(cmd_new && cmd == 16'h00DB, "strobe after the write");
    @(negedge clk);
    check(!cmd_new, "strobe lasts one cycle");
    // timer and status writes are passed on combinationally
    @(negedge clk); addr = REG_TIMER; wdata = 16'h7777; wr = 1; #1;
    check(timer_wr && timer_wdata == 16'h7777, "timer write passed on");
    addr = REG_STATUS; wdata = 16'hF000; #1;
    check(status_clr == 16'hF000 && !timer_wr, "status write clears");
    @(negedge clk); wr = 0; #1;
    check(status_clr == 16'h0, "no clear without write");
    // message read strobe
    @(negedge clk); addr = REG_MSG; rd = 1; #1;
    check(msg_rd, "message read strobe");
    @(negedge clk); rd = 0;
    // hardware writes win
    @(negedge clk); addr = REG_MSG; wdata = 16'h1111; wr = 1; msg_wr = 1; msg_wd = 16'h2222;
    tstm_wr = 1; tstm_wd = 16'h3333; eubrs_wr = 1; eubrs_wd = 16'h4444;
    @(negedge clk); wr = 0; msg_wr = 0; tstm_wr = 0; eubrs_wr = 0;
    check(msg == 16'h2222 && tstm == 16'h3333 && eubrs == 16'h4444, "hardware writes");
    // INTA is a strobe, not stored
    @(negedge clk); addr = REG_CONFIG; wdata = 16'h0001; wr = 1; #1;
    check(inta, "inta strobe");
    @(negedge clk); wr = 0;
    check(cfg.inta == 1'b0, "inta not stored");
    // software reset
    write(REG_CONFIG, 16'h0004);
    check(srst, "srst one cycle after SRES write");
    @(negedge clk);
    check(!srst && cfg.sres == 1'b0, "srst pulse, sres self-clears");
    check(d0 == DATA0_RESET && eubrs == 16'd26 && msg == 16'd0 && tstm == 16'd0, "module registers reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
