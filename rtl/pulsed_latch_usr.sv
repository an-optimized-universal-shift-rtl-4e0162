// pulsed_latch_usr: N-bit universal shift register built from pulsed latches.
//
// A shift register made of flip-flops needs two latches per bit. Here every
// bit is a single latch opened by a short pulse, which roughly halves the
// storage area and clock load. A chain of plain pulsed latches would race
// (a latch's input would change while it is still open), so the register is
// cut into N/K sub shift registers of K bits, each with one extra temporary
// latch, and all of them share one generator of K+1 non-overlapping delayed
// pulses. Within each sub register the latches are written in an order in
// which every latch is read before it is overwritten; between sub registers
// the temporary latches carry the boundary bit. This organisation, the
// 256-bit word length and the 4-bit sub register (320 latches in all) follow
// the document.
//
// Every rising edge of clk performs one operation chosen by {s1, s0}:
//   00 hold, 01 shift right (SR[i] <- SR[i-1], SR[0] <- in),
//   10 shift left (SR[i] <- SR[i+1], SR[N-1] <- in1), 11 load SR <- I.
// The code assignment and the choice of "in" as the shift-right and "in1" as
// the shift-left serial input are this design's own; the document names
// these signals but not their meaning.
//
// Ports:  clk     system clock (28 MHz in the document's measurements)
//         rst_n   asynchronous clear of every latch, active low
//         s0, s1  mode select
//         in      serial input for shift right; in1 for shift left
//         I       parallel input; SR the stored word (SR[0] is Q1 of sub
//                 register #1)
// Timing: the operation is carried out by the pulse train that follows the
//         rising clock edge and takes (K+1)*(T_DELAY+2*T_INV) - T_INV
//         (14.5 ns with the defaults). s0, s1, in, in1 and I must be stable
//         from the clock edge until the train has ended; SR is final after
//         that. The train must end before the next rising edge.
`timescale 1ns / 1ps
module pulsed_latch_usr
  import usr_pkg::*;
#(
  parameter int unsigned N       = 256,    // word length
  parameter int unsigned K       = 4,      // sub shift register word length
  parameter realtime     T_DELAY = 2.0ns,  // delay element of a pulse stage
  parameter realtime     T_INV   = 0.5ns   // inverter of a pulse stage
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         s0,
  input  logic         s1,
  input  logic         in,
  input  logic         in1,
  input  logic [N-1:0] I,
  output logic [N-1:0] SR
);

  localparam int unsigned M = N / K;   // number of sub shift registers

  usr_mode_e    mode;
  logic         pulse_t;
  logic [K-1:0] pulse;
  logic [M:0]   t_chain;   // t_chain[m+1]: temporary latch of sub register m

  assign mode = usr_mode_e'({s1, s0});

  pulse_clock_gen #(
    .K       (K),
    .T_DELAY (T_DELAY),
    .T_INV   (T_INV)
  ) u_pg (
    .clk     (clk),
    .pulse_t (pulse_t),
    .pulse   (pulse)
  );

  assign t_chain[0] = in;

  for (genvar m = 0; m < M; m++) begin : g_sub
    logic t_hi;
    assign t_hi = (m == M - 1) ? in1 : t_chain[(m == M - 1) ? M : m + 2];

    usr_sub_shift_register #(
      .K (K)
    ) u_sub (
      .rst_n   (rst_n),
      .mode    (mode),
      .pulse_t (pulse_t),
      .pulse   (pulse),
      .par     (I[m*K +: K]),
      .t_lo    (t_chain[m]),
      .t_hi    (t_hi),
      .q       (SR[m*K +: K]),
      .t       (t_chain[m+1])
    );
  end

  // The word must split evenly into sub shift registers.
  initial begin
    assert (N % K == 0 && K >= 2)
      else $error("pulsed_latch_usr: N (%0d) must be a multiple of K (%0d) and K >= 2", N, K);
  end

  // The mode must not change while a pulse is open, or a latch could be
  // written with a mix of two operations. Checked outside reset only, since
  // the pulse chain may glitch while it settles after power-up.
  always @(s0 or s1) begin
    if (rst_n)
      assert (!(pulse_t || (|pulse)))
      else $error("pulsed_latch_usr: mode changed while a pulse was open");
  end

endmodule
