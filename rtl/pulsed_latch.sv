// pulsed_latch: one storage element of the shift register.
//
// A level-sensitive D latch whose enable is a short clock pulse instead of a
// clock phase. While `pulse` is high the latch is transparent and q follows
// d; when `pulse` falls q keeps the last value of d. Together with a shared
// pulse generator this replaces a master-slave flip-flop with a single latch
// stage, which is the central idea of the design.
//
// The asynchronous active-low clear `rst_n` is this design's own addition:
// the document shows the latch with only D, CLK and Q, but every stored bit
// must start from a known value.
//
// Ports:  rst_n  asynchronous clear, active low (clears q to 0)
//         pulse  pulsed clock; the latch is open while it is high
//         d, q   data in and out
// Timing: d must be stable for the whole width of `pulse`; q changes only
//         while `pulse` is high or when rst_n is low.
//
// In the shift register q feeds back to d through the input mux, which lint
// reports as a combinational loop; usr_sub_shift_register explains why that
// loop is safe.
`timescale 1ns / 1ps
module pulsed_latch (
  input  logic rst_n,
  input  logic pulse,
  input  logic d,
  output logic q
);

  always_latch begin
    if (!rst_n)
      q = 1'b0;
    else if (pulse)
      q = d;
  end

endmodule
