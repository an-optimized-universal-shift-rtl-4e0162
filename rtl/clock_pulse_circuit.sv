// clock_pulse_circuit: behavioural model of one stage of the delayed pulsed
// clock generator. It is timing-defined circuitry (a delay element and
// gates whose propagation delays set the pulse width), so it is modelled
// with delays here and is not meant for synthesis.
//
// A rising edge on clk_in produces one pulse on `pulse` of width
// T_DELAY + T_INV; clk_out is clk_in delayed by T_DELAY + 2*T_INV and feeds
// the next stage. The stage chain therefore gives a train of pulses, each
// starting T_INV after the previous one ended, so consecutive pulses never
// overlap. Following the document, the delayed clock is taken after a
// delay element and two inversions and the pulse is formed from the clock
// and the once-inverted delayed clock; the clock buffer on the pulse output
// is a plain connection here. The delay values are this design's choice
// (the document gives none): with the defaults a five-stage chain finishes
// in 15 ns, inside the high phase of a 28 MHz clock.
//
// Ports:  clk_in   clock or delayed clock from the previous stage
//         pulse    the pulse, high from clk_in's rise for T_DELAY + T_INV
//         clk_out  delayed clock for the next stage
`timescale 1ns / 1ps
module clock_pulse_circuit #(
  parameter realtime T_DELAY = 2.0ns,  // delay element
  parameter realtime T_INV   = 0.5ns   // one inverter
) (
  input  logic clk_in,
  output logic pulse,
  output logic clk_out
);

  logic delayed;     // after the delay element
  logic delayed_n;   // after the first inverter

  assign #(T_DELAY) delayed   = clk_in;
  assign #(T_INV)   delayed_n = ~delayed;
  assign #(T_INV)   clk_out   = ~delayed_n;
  assign            pulse     = clk_in & delayed_n;

endmodule
