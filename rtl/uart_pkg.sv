// uart_pkg: types and constants shared by the real-time UART extension module.
//
// The register file holds eight 16-bit registers (status, config, data 0..5). The
// order and the field names come from the register table of the design; the bit
// positions are this design's own numbering (fields packed from bit 15 down, the
// generic INT/RDY/ERR/BUSY/FSS and INTA/ID/SRES/OUTD/EFSS fields in bits 4..0).
// Event and action codes are the ones of the event/action table.
package uart_pkg;

  // Register addresses (Address lines of the extension module interface).
  typedef enum logic [2:0] {
    REG_STATUS = 3'd0,
    REG_CONFIG = 3'd1,
    REG_DATA0  = 3'd2,  // UART configuration (frame format, oversampling bounds)
    REG_CMD    = 3'd3,  // Data 1: command register
    REG_MSG    = 3'd4,  // Data 2: message register
    REG_TIMER  = 3'd5,  // Data 3: timer register
    REG_TSTM   = 3'd6,  // Data 4: timestamp / timer match register
    REG_EUBRS  = 3'd7   // Data 5: enhanced baud rate setting, 12.4 fixed point
  } reg_addr_e;

  // Events (EvS field).
  typedef enum logic [1:0] {
    EV_NONE        = 2'b00,
    EV_START_BIT   = 2'b01,
    EV_RX_COMPLETE = 2'b10,
    EV_TIMER_MATCH = 2'b11
  } event_e;

  // Assigned actions (AsA field). 000, 110 and 111 do nothing.
  typedef enum logic [2:0] {
    ACT_NONE      = 3'b000,
    ACT_TIMESTAMP = 3'b001,
    ACT_TIMER_RST = 3'b010,
    ACT_SEND      = 3'b011,
    ACT_RX_ENABLE = 3'b100,
    ACT_RX_DIS    = 3'b101
  } action_e;

  // Config register (generic part plus LOOW).
  typedef struct packed {
    logic [7:0] unused_hi;
    logic       loow;
    logic [1:0] unused_lo;
    logic       efss;   // enter fail-safe state
    logic       outd;   // output disable
    logic       sres;   // software reset (self-clearing)
    logic       id;     // interrupt disable
    logic       inta;   // interrupt acknowledge (self-clearing)
  } config_t;

  // Data 0: communication parameters.
  typedef struct packed {
    logic       par_ena;     // parity bit present
    logic       odd;         // 1: odd parity, 0: even parity
    logic       stop;        // 0: one stop bit, 1: two stop bits
    logic       tx_cnt;      // stored, no function defined
    logic [3:0] msg_length;  // data bits per frame, 0 means 16
    logic [3:0] overs_high;  // ones count above 2*overs_high reads '1'
    logic [3:0] overs_low;   // ones count below 2*overs_low reads '0'
  } data0_t;

  // Data 1: command register.
  typedef struct packed {
    logic [7:0] unused;
    logic       erri;  // interrupt on error
    logic       ei;    // interrupt on event
    action_e    asa;   // assigned action
    event_e     evs;   // event selection
    logic       snce;  // start synchronization
  } cmd_t;

  // Status register.
  typedef struct packed {
    logic       ovs_err;  // oversampling error: a bit fell between the bounds
    logic       tr_err;   // transmission error: stop bit '0' or bus read-back mismatch
    logic       par_err;  // parity error
    logic       evf;      // event flag: an assigned action was executed
    logic       ovf;      // overflow: a message arrived while RBR was still set
    logic       rbr;      // receive buffer ready
    logic       tbr;      // transmit buffer ready (transmitter idle)
    logic       sncr;     // synchronization completed
    logic       loor;     // read-back of LOOW
    logic [1:0] unused;
    logic       fss;      // in fail-safe state
    logic       busy;
    logic       err;
    logic       rdy;
    logic       intr;
  } status_t;


  // Reset values (this design's choice): 8 data bits, odd parity, one stop bit,
  // '1' above 20 of 32 ones, '0' below 12 of 32 ones.
  localparam data0_t DATA0_RESET = '{par_ena: 1'b1, odd: 1'b1, stop: 1'b0, tx_cnt: 1'b0,
                                     msg_length: 4'd8, overs_high: 4'd10, overs_low: 4'd6};

endpackage
