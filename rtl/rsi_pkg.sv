// rsi_pkg: types and constants shared by the Robot Sensor Interface (RSI)
// master subsystem and its sensor slaves.
//
// The RSI protocol is an I2C derivative for fast sensor reads. A frame is
//   START, 8-bit slave address, ACK, 7-bit register address + R/W bit, ACK,
//   DATA, ACK ... DATA, NACK (read) / ACK (write), STOP
// so a read needs no repeated START and no second slave address. The master
// state numbering below follows the published simulation of a single-byte
// read (states 0..9); the field widths (8-bit slave address, 7-bit register
// address, 8-bit data) follow the protocol definition. The widths of the
// byte count and of the buffer address, and the layout of the control and
// status words, are this design's own choices.
package rsi_pkg;

  localparam int unsigned SADDR_W = 8;   // slave address: up to 256 slaves
  localparam int unsigned RADDR_W = 7;   // internal register address
  localparam int unsigned DATA_W  = 8;   // one data packet
  localparam int unsigned SIZE_W  = 8;   // bytes per fetch (design choice)
  localparam int unsigned BADDR_W = 8;   // buffer byte address (design choice)

  // RSI master FSM states, numbered as in the single-byte read timing:
  // idle, start, slave address, its ACK, register address, R/W bit, its ACK,
  // data byte, ACK/NACK after the byte, stop.
  typedef enum logic [3:0] {
    ST_IDLE  = 4'd0,
    ST_START = 4'd1,
    ST_SADDR = 4'd2,
    ST_SACK  = 4'd3,
    ST_RADDR = 4'd4,
    ST_RW    = 4'd5,
    ST_RACK  = 4'd6,
    ST_DATA  = 4'd7,
    ST_DACK  = 4'd8,
    ST_STOP  = 4'd9
  } rsi_state_e;

  // Control word: the command the accelerator places in the control register.
  typedef struct packed {
    logic               start;   // request a fetch cycle; cleared once accepted
    logic               rw;      // 1 = read from the slave, 0 = write to it
    logic [SADDR_W-1:0] saddr;   // slave (sensor) address
    logic [RADDR_W-1:0] raddr;   // first internal register address
    logic [SIZE_W-1:0]  size;    // number of data bytes (0 is taken as 1)
    logic [BADDR_W-1:0] base;    // buffer address of the first byte
  } rsi_ctrl_t;

  // Slave details the CPU hands to the accelerator (one per fetch cycle).
  typedef struct packed {
    logic               rw;
    logic [SADDR_W-1:0] saddr;
    logic [RADDR_W-1:0] raddr;
    logic [SIZE_W-1:0]  size;
    logic [BADDR_W-1:0] base;
  } rsi_desc_t;

  // State update the RSI block reports every cycle.
  typedef struct packed {
    rsi_state_e         state;   // present FSM state
    logic               accept;  // one-cycle pulse: control word taken
    logic               done;    // one-cycle pulse: STOP finished
    logic               nack;    // with done: a slave did not acknowledge
    logic [SIZE_W:0]    bytes;   // data bytes moved in this fetch so far
  } rsi_update_t;

  // Status word held in the status register.
  typedef struct packed {
    rsi_state_e         state;
    logic               busy;    // a fetch is in progress
    logic               done;    // sticky: last fetch finished
    logic               error;   // sticky: last fetch ended on a missing ACK
    logic [SIZE_W:0]    bytes;   // bytes moved by the last / present fetch
  } rsi_status_t;

endpackage
