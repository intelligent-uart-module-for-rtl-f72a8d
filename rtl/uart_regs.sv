// uart_regs: the eight 16-bit interface registers of the UART extension module.
//
// Address map (Address lines of the extension interface):
//   0 status   read: status_i; write: a '1' clears the sticky bits
//              OvSErr, TrErr, ParErr, EvF, OvF, SncR and INT (status_clr_o)
//   1 config   INTA (self-clearing, interrupt acknowledge), ID (interrupt
//              disable), SRES (self-clearing software reset), OUTD (output
//              disable), EFSS (enter fail-safe state), LOOW
//   2 data 0   frame format and oversampling bounds (uart_pkg::data0_t)
//   3 data 1   command register (uart_pkg::cmd_t); every write raises cmd_new_o
//              for one cycle, so the command is processed one clock after the write
//   4 data 2   message register: written by the processor for sending and by the
//              receiver on receive completion; reading it raises msg_rd_o
//   5 data 3   timer register: lives in the timing unit; reads timer_i, a write is
//              passed on as timer_wr_o
//   6 data 4   TS/TM register: timestamp or timer-match value; also written by
//              the timestamp action
//   7 data 5   EUBRS register: 12.4 fixed-point baud setting; also written by the
//              synchronization unit
// The module answers only when sel_i is high (BaseAddress decoded by the top).
// Writes take effect at the clock edge on which wr_i is sampled; reads are
// combinational. When hardware and processor write the same register in the
// same cycle, the hardware value is kept. A software reset (srst_o, one cycle
// after SRES is written) returns the module-specific registers to their reset
// values. The register set, the order and the field names follow the register
// table; the bit positions, reset values and write rules are this design's.
module uart_regs
  import uart_pkg::*;
#(
  parameter logic [15:0] EUBRS_RESET = 16'd26
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  // processor side
  input  logic        sel_i,
  input  logic [2:0]  addr_i,
  input  logic        wr_i,
  input  logic        rd_i,
  input  logic [15:0] wdata_i,
  output logic [15:0] rdata_o,
  // hardware side
  input  status_t     status_i,
  input  logic [15:0] timer_i,
  input  logic        tstm_wr_i,
  input  logic [15:0] tstm_wdata_i,
  input  logic        msg_wr_i,
  input  logic [15:0] msg_wdata_i,
  input  logic        eubrs_wr_i,
  input  logic [15:0] eubrs_wdata_i,
  output config_t     cfg_o,
  output data0_t      data0_o,
  output cmd_t        cmd_o,
  output logic        cmd_new_o,
  output logic [15:0] msg_o,
  output logic [15:0] tstm_o,
  output logic [15:0] eubrs_o,
  output logic        timer_wr_o,
  output logic [15:0] timer_wdata_o,
  output logic [15:0] status_clr_o,
  output logic        msg_rd_o,
  output logic        inta_o,
  output logic        srst_o
);
  logic       we, re;
  reg_addr_e  a;
  config_t    cfg_q;
  data0_t     data0_q;
  cmd_t       cmd_q;
  logic [15:0] msg_q, tstm_q, eubrs_q;
  logic       srst_q, cmd_new_q;

  assign a  = reg_addr_e'(addr_i);
  assign we = sel_i && wr_i;
  assign re = sel_i && rd_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cfg_q     <= '0;
      data0_q   <= DATA0_RESET;
      cmd_q     <= '0;
      cmd_new_q <= 1'b0;
      msg_q     <= '0;
      tstm_q    <= '0;
      eubrs_q   <= EUBRS_RESET;
      srst_q    <= 1'b0;
    end else begin
      cmd_new_q <= 1'b0;
      srst_q    <= 1'b0;
      if (we && a == REG_CONFIG) begin
        cfg_q      <= config_t'(wdata_i);
        cfg_q.inta <= 1'b0;
        cfg_q.sres <= 1'b0;
        srst_q     <= wdata_i[2];
      end
      if (srst_q) begin
        data0_q <= DATA0_RESET;
        cmd_q   <= '0;
        msg_q   <= '0;
        tstm_q  <= '0;
        eubrs_q <= EUBRS_RESET;
      end else begin
        if (we && a == REG_DATA0) data0_q <= data0_t'(wdata_i);
        if (we && a == REG_CMD) begin
          cmd_q     <= cmd_t'(wdata_i);
          cmd_new_q <= 1'b1;
        end
        if (msg_wr_i)                 msg_q <= msg_wdata_i;
        else if (we && a == REG_MSG)  msg_q <= wdata_i;
        if (tstm_wr_i)                tstm_q <= tstm_wdata_i;
        else if (we && a == REG_TSTM) tstm_q <= wdata_i;
        if (eubrs_wr_i)                eubrs_q <= eubrs_wdata_i;
        else if (we && a == REG_EUBRS) eubrs_q <= wdata_i;
      end
    end
  end

  always_comb begin
    rdata_o = '0;
    if (re) begin
      unique case (a)
        REG_STATUS: rdata_o = status_i;
        REG_CONFIG: rdata_o = cfg_q;
        REG_DATA0:  rdata_o = data0_q;
        REG_CMD:    rdata_o = cmd_q;
        REG_MSG:    rdata_o = msg_q;
        REG_TIMER:  rdata_o = timer_i;
        REG_TSTM:   rdata_o = tstm_q;
        REG_EUBRS:  rdata_o = eubrs_q;
      endcase
    end
  end

  assign cfg_o         = cfg_q;
  assign data0_o       = data0_q;
  assign cmd_o         = cmd_q;
  assign cmd_new_o     = cmd_new_q;
  assign msg_o         = msg_q;
  assign tstm_o        = tstm_q;
  assign eubrs_o       = eubrs_q;
  assign timer_wr_o    = we && a == REG_TIMER;
  assign timer_wdata_o = wdata_i;
  assign status_clr_o  = (we && a == REG_STATUS) ? wdata_i : 16'd0;
  assign msg_rd_o      = re && a == REG_MSG;
  assign inta_o        = we && a == REG_CONFIG && wdata_i[0];
  assign srst_o        = srst_q;
endmodule
