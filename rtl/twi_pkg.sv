// Shared types of the TWI (I2C) communication analyser.
//
// state_t enumerates the states of the monitor state machine. The eight
// state names are the document's; the 3-bit binary encoding is this
// design's own choice. ADDR_BITS is the 7-bit slave address of the
// monitored protocol; the address register is one bit wider with a 0 MSB so
// that it has the same width as a data byte.
package twi_pkg;

  localparam int unsigned ADDR_BITS = 7;
  localparam int unsigned BYTE_BITS = 8;

  typedef enum logic [2:0] {
    IDLE       = 3'd0,
    READ_ADDR  = 3'd1,
    READ_DIR   = 3'd2,
    ACK_DETECT = 3'd3,
    SNIFF_DATA = 3'd4,
    ACK_ERROR  = 3'd5,
    BUSY       = 3'd6,
    DONE       = 3'd7
  } state_t;

endpackage
