// pulse_clock_gen: the delayed pulsed clock generator shared by every sub
// shift register.
//
// K+1 clock-pulse circuits are chained: the first takes CLK and each later
// one takes the delayed clock of the one before. After every rising CLK edge
// the chain gives K+1 non-overlapping pulses in a fixed order: first
// CLK_pulse<T> (for the temporary latches), then CLK_pulse<K>, CLK_pulse<K-1>
// and so on down to CLK_pulse<1>. That order and the chain structure follow
// the document. One generator serves the whole register, so the number of
// pulse circuits depends only on the sub-register width K, not on the word
// length.
//
// Ports:  clk        system clock
//         pulse_t    CLK_pulse<T>, first pulse of each cycle
//         pulse[k]   CLK_pulse<k+1> for k = 0..K-1; pulse[K-1] comes second,
//                    pulse[0] comes last
// Timing: pulse j of the train (j = 0 for T) rises
//         j*(T_DELAY + 2*T_INV) after the CLK edge and lasts T_DELAY + T_INV.
//         The whole train must end before the next rising CLK edge.
`timescale 1ns / 1ps
module pulse_clock_gen #(
  parameter int unsigned K       = 4,
  parameter realtime     T_DELAY = 2.0ns,
  parameter realtime     T_INV   = 0.5ns
) (
  input  logic         clk,
  output logic         pulse_t,
  output logic [K-1:0] pulse
);

  // chain[0] is CLK, chain[j] is CLK<j>, the delayed clock out of stage j-1.
  // The last stage's delayed clock has no next stage and is left open.
  logic [K:0]   chain;
  logic [K:0]   stage_pulse;   // stage_pulse[j]: j-th pulse in time

  assign chain[0] = clk;

  for (genvar j = 0; j < K; j++) begin : g_stage
    clock_pulse_circuit #(
      .T_DELAY (T_DELAY),
      .T_INV   (T_INV)
    ) u_cpc (
      .clk_in  (chain[j]),
      .pulse   (stage_pulse[j]),
      .clk_out (chain[j+1])
    );
  end

  clock_pulse_circuit #(
    .T_DELAY (T_DELAY),
    .T_INV   (T_INV)
  ) u_cpc_last (
    .clk_in  (chain[K]),
    .pulse   (stage_pulse[K]),
    .clk_out ()
  );

  // first pulse -> temporary latches; then CLK_pulse<K> down to CLK_pulse<1>
  assign pulse_t = stage_pulse[0];
  for (genvar k = 0; k < K; k++) begin : g_map
    assign pulse[k] = stage_pulse[K-k];
  end

endmodule
