// usr_mux4: the 4-to-1 multiplexer in front of each data latch.
//
// It chooses what the latch takes at its next pulse: its own output (hold),
// the bit on its left (shift right), the bit on its right (shift left) or
// its parallel input (load). The document shows a 4x1 mux per latch
// selected by s1/s0; the assignment of codes to inputs is this design's
// choice and is defined in usr_pkg.
//
// Purely combinational.
`timescale 1ns / 1ps
module usr_mux4
  import usr_pkg::*;
(
  input  usr_mode_e mode,
  input  logic      own,       // the latch's own output
  input  logic      from_lo,   // lower-index neighbour, used by shift right
  input  logic      from_hi,   // higher-index neighbour, used by shift left
  input  logic      par,       // parallel input
  output logic      y
);

  always_comb begin
    unique case (mode)
      MODE_HOLD: y = own;
      MODE_SHR:  y = from_lo;
      MODE_SHL:  y = from_hi;
      MODE_LOAD: y = par;
    endcase
  end

endmodule
