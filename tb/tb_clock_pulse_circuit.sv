// tb_clock_pulse_circuit: timing test of one clock-pulse stage.
//
// Drives a 28 MHz clock and measures, for every cycle, when the pulse rises
// and falls and when the delayed clock rises and falls. The expected values
// are computed from the stage's delay parameters: the pulse starts at the
// clock edge and lasts T_DELAY + T_INV, and the delayed clock lags by
// T_DELAY + 2*T_INV. It also checks that the falling clock edge gives no
// pulse. Edges before the first clock edge, while the stage settles from
// its arbitrary power-up state, are ignored.
`timescale 1ns / 1ps
module tb_clock_pulse_circuit;

  localparam realtime T_DELAY = 2.0ns;
  localparam realtime T_INV   = 0.5ns;
  localparam realtime HALF    = 17.857ns;   // 28 MHz

  logic clk = 1'b0, pulse, clk_out;
  int   checks = 0, failures = 0;
  int   pulses = 0, out_edges = 0;
  realtime t_edge, t_fall_clk;
  logic    started = 1'b0;   // the stage settles from an arbitrary state first

  clock_pulse_circuit #(.T_DELAY(T_DELAY), .T_INV(T_INV)) dut (
    .clk_in(clk), .pulse(pulse), .clk_out(clk_out));

  task automatic check_time(input realtime got, input realtime exp, input string what);
    checks++;
    if (got < exp - 0.01 || got > exp + 0.01) begin
      failures++;
      $display("FAIL %s: %0.3f ns, expected %0.3f ns", what, got, exp);
    end
  endtask

  always @(posedge pulse) if (started) begin
    pulses++;
    check_time($realtime - t_edge, 0.0, "pulse start after clock edge");
    checks++;
    if (clk !== 1'b1) begin
      failures++;
      $display("FAIL pulse started while clock low");
    end
  end
  always @(negedge pulse) if (started) check_time($realtime - t_edge, T_DELAY + T_INV, "pulse width");
  always @(posedge clk_out) if (started) begin
    out_edges++;
    check_time($realtime - t_edge, T_DELAY + 2 * T_INV, "delayed clock rise");
  end
  always @(negedge clk_out)
    if (started) check_time($realtime - t_fall_clk, T_DELAY + 2 * T_INV, "delayed clock fall");

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    t_edge = 0.0; t_fall_clk = 0.0;
    #(HALF);
    for (int i = 0; i < 20; i++) begin
      clk = 1'b1; t_edge = $realtime; started = 1'b1;
      #(HALF);
      clk = 1'b0; t_fall_clk = $realtime;
      #(HALF);
    end
    checks++;
    if (pulses != 20 || out_edges != 20) begin
      failures++;
      $display("FAIL %0d pulses and %0d delayed edges for 20 clock cycles", pulses, out_edges);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
