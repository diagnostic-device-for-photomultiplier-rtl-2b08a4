// pdd_pkg: types and constants shared by the PMT diagnostic device firmware.
//
// The device is controlled through eight 8-bit registers. A command is one
// or two bytes: a command byte whose bit 7 selects read (1) or write (0) and
// whose bits 2:0 give the register address, followed for a write by one data
// byte. The register count, the roles of the registers (status, PWM reload
// and compare, four DAC values) and the widths (16-bit reload, 8-bit compare,
// 8-bit DACs) follow the device paper; the command-byte layout, the order of the
// registers and the status bit positions are this design's own choices.
package pdd_pkg;

  // Register map (eight registers).
  typedef enum logic [2:0] {
    REG_STATUS    = 3'd0,  // read: status bits below; write: 1 clears a sticky bit
    REG_RELOAD_HI = 3'd1,  // PWM reload, bits 15:8 (staged until RELOAD_LO is written)
    REG_RELOAD_LO = 3'd2,  // PWM reload, bits 7:0 (commits the 16-bit value)
    REG_COMPARE   = 3'd3,  // PWM compare (pulse width in clock cycles)
    REG_DAC0      = 3'd4,  // DAC value of LED channel 0 ... channel 3
    REG_DAC1      = 3'd5,
    REG_DAC2      = 3'd6,
    REG_DAC3      = 3'd7
  } reg_addr_e;

  localparam int unsigned NUM_DAC = 4;

  // Command byte.
  localparam int unsigned CMD_READ_BIT = 7;

  // Status register bits.
  localparam int unsigned ST_DAC_ERR_LSB = 0;  // bits 3:0, sticky: DAC n did not acknowledge
  localparam int unsigned ST_BUSY        = 4;  // DAC I2C bus busy or a DAC write waiting
  localparam int unsigned ST_RELOAD_REJ  = 5;  // sticky: a reload below the minimum was refused

  // One byte moving between the links and the command handler.
  typedef struct packed {
    logic       valid;
    logic [7:0] data;
  } byte_beat_t;

  // Active command source.
  typedef enum logic {
    SRC_I2C  = 1'b0,
    SRC_UART = 1'b1
  } src_e;

endpackage
