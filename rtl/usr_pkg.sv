// usr_pkg: types and constants shared by the pulsed-latch universal shift
// register.
//
// The operating mode comes from the two select lines s1 and s0 that drive
// the 4x1 multiplexer in front of every data latch. The document names s0 and
// s1 but does not print which code selects which operation; the encoding
// below (hold, shift right, shift left, parallel load for 00, 01, 10, 11) is
// this design's choice and follows the usual universal shift register
// convention.

`timescale 1ns / 1ps
package usr_pkg;

  typedef enum logic [1:0] {
    MODE_HOLD  = 2'b00,  // every data latch reloads its own value
    MODE_SHR   = 2'b01,  // bit i takes bit i-1; bit 0 takes the serial input "in"
    MODE_SHL   = 2'b10,  // bit i takes bit i+1; bit N-1 takes the serial input "in1"
    MODE_LOAD  = 2'b11   // every data latch takes its parallel input
  } usr_mode_e;

endpackage
