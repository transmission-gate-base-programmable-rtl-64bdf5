// Shared constants and types of the programmable incrementer/decrementer.
//
// DEFAULT_WIDTH is the eight-bit data path of the design. dir_e encodes the
// direction input: INC (0) adds the running count to the load value, DEC (1)
// subtracts it. That 0/1 encoding is the one the design's direction signal
// uses; the enum only names it.
package inc_dec_pkg;

  localparam int unsigned DEFAULT_WIDTH = 8;

  typedef enum logic {
    INC = 1'b0,
    DEC = 1'b1
  } dir_e;

endpackage
