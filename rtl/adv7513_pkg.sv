// Shared types and constants for the ADV7513 HDMI transmitter configurator.
//
// The configurator talks to the transmitter's main register map over I2C.
// Every access is a single-register transfer: a write carries a register
// address and one data byte, a read returns one data byte.  The structs
// below are the command and response that pass between the sequencer
// (adv7513_ctrl) and the bus engine (i2c_master).
//
// The 8-bit bus address 0x72 (7-bit 0x39, read form 0x73) follows from
// the PD/AD strap being pulled down on the DE10-Nano board.  Register
// 0x96 bit assignments follow the order in which the interrupts are
// listed next to the value 0xF6.  The HPD state register (0x42 bit 6) is
// taken from the transmitter's programming guide, not from the board
// notes.
package adv7513_pkg;

  // 7-bit device address of the main register map (8-bit write form 0x72).
  localparam logic [6:0] ADV7513_MAIN_ADDR = 7'h39;

  // Interrupt status register and its flags.
  localparam logic [7:0] REG_INT_STATUS = 8'h96;
  localparam int unsigned INT_HPD_BIT       = 7;
  localparam int unsigned INT_MSEN_BIT      = 6;
  localparam int unsigned INT_VSYNC_BIT     = 5;
  localparam int unsigned INT_AFIFO_BIT     = 4;
  localparam int unsigned INT_EDID_RDY_BIT  = 2;
  localparam int unsigned INT_HDCP_BIT      = 1;

  // Value written to 0x96 at configuration: all six interrupts above (0xF6).
  localparam logic [7:0] INT_MASK_ALL = 8'((1 << INT_HPD_BIT) | (1 << INT_MSEN_BIT) |
                                           (1 << INT_VSYNC_BIT) | (1 << INT_AFIFO_BIT) |
                                           (1 << INT_EDID_RDY_BIT) | (1 << INT_HDCP_BIT));

  // Hot-plug state register and bit.
  localparam logic [7:0] REG_HPD_STATE = 8'h42;
  localparam int unsigned HPD_STATE_BIT = 6;

  // Number of register writes in the configuration table.
  localparam int unsigned CFG_ENTRIES = 24;

  // One register write of the configuration table.
  typedef struct packed {
    logic [7:0] addr;
    logic [7:0] data;
  } reg_write_t;

  // Command to the I2C bus engine.
  typedef struct packed {
    logic       rd;        // 1: read reg_addr, 0: write wdata to reg_addr
    logic [6:0] dev;       // 7-bit device address
    logic [7:0] reg_addr;  // register (sub-)address
    logic [7:0] wdata;     // data byte for a write
  } i2c_cmd_t;

  // Response from the I2C bus engine, valid for one cycle.
  typedef struct packed {
    logic       nack;      // a byte was not acknowledged; transfer aborted
    logic [7:0] rdata;     // data byte of a read
  } i2c_rsp_t;

endpackage
