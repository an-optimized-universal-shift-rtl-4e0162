// usr_sub_shift_register: one K-bit universal sub shift register.
//
// K data latches (Q1..QK, here q[0]..q[K-1]) each fed by a 4x1 mux, plus one
// temporary latch T. The latches are opened one after another by
// non-overlapping pulses, so a latch is always written after the latch that
// reads it has already closed, and no latch sees its input change while it
// is open. The temporary latch is pulsed first and holds the bit that leaves
// this sub register during a shift, so the neighbouring sub register can
// still read the old value after this one has been overwritten. This
// structure (K data latches, a temporary latch, a 4x1 mux per data latch,
// pulses T, K, ..., 1) follows the document.
//
// Shift right (q[i] <- q[i-1]): T takes q[K-1] at pulse_t, then q[K-1] is
// written at CLK_pulse<K>, ..., q[0] last at CLK_pulse<1>, taking the T
// latch of the sub register below (t_lo) or the serial input.
//
// Shift left (q[i] <- q[i+1]) needs the opposite write order inside the sub
// register. The document does not say how left shifts are timed; this
// design steers the pulses in mirror order while the mode is shift left
// (q[k] is written by CLK_pulse<K-k> instead of CLK_pulse<k+1>) and lets T
// take q[0]. q[K-1] is then written last, from the T latch of the sub
// register above (t_hi).
//
// Hold and parallel load use the normal pulse order; T takes q[K-1].
//
// Ports:  rst_n            asynchronous clear of all latches, active low
//         mode             s1/s0 as usr_mode_e; must be stable from before
//                          the CLK edge until the pulse train has ended
//         pulse_t, pulse   CLK_pulse<T> and CLK_pulse<1..K> (pulse[k] is
//                          CLK_pulse<k+1>)
//         par              parallel inputs
//         t_lo, t_hi       T latch of the sub register below / above, or
//                          the serial inputs at the ends of the chain
//         q                stored bits; t  the temporary latch
//
// Lint reports a combinational loop through the latches here. It is real
// and intended: in hold mode a latch's output returns to its own input
// through the mux, and the neighbour connections run in both directions.
// Each loop passes through a latch that is closed except during its own
// pulse, and while a latch is open its loop is either the identity (hold)
// or passes through a neighbour that is closed, so the loop never
// oscillates. For the same reason Verilator may say it finds no latch in
// pulsed_latch once the loop is flattened; the storage is still a latch.
`timescale 1ns / 1ps
module usr_sub_shift_register
  import usr_pkg::*;
#(
  parameter int unsigned K = 4
) (
  input  logic         rst_n,
  input  usr_mode_e    mode,
  input  logic         pulse_t,
  input  logic [K-1:0] pulse,
  input  logic [K-1:0] par,
  input  logic         t_lo,
  input  logic         t_hi,
  output logic [K-1:0] q,
  output logic         t
);

  logic [K-1:0] d;        // mux outputs
  logic [K-1:0] en;       // pulse steered to each data latch
  logic         t_d;      // temporary latch input
  logic         shl;

  assign shl = (mode == MODE_SHL);

  for (genvar k = 0; k < K; k++) begin : g_bit
    logic lo, hi;
    assign lo    = (k == 0)     ? t_lo : q[(k == 0) ? 0 : k-1];
    assign hi    = (k == K - 1) ? t_hi : q[(k == K - 1) ? K-1 : k+1];
    assign en[k] = shl ? pulse[K-1-k] : pulse[k];

    usr_mux4 u_mux (
      .mode    (mode),
      .own     (q[k]),
      .from_lo (lo),
      .from_hi (hi),
      .par     (par[k]),
      .y       (d[k])
    );

    pulsed_latch u_lat (
      .rst_n (rst_n),
      .pulse (en[k]),
      .d     (d[k]),
      .q     (q[k])
    );
  end

  assign t_d = shl ? q[0] : q[K-1];

  pulsed_latch u_tmp (
    .rst_n (rst_n),
    .pulse (pulse_t),
    .d     (t_d),
    .q     (t)
  );

endmodule
