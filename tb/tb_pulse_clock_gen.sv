// tb_pulse_clock_gen: timing test of the delayed pulsed clock generator.
//
// Two generators are driven from one 28 MHz clock: one for 4-bit and one for
// 8-bit sub shift registers. For every pulse the test records its start and
// end relative to the rising clock edge and compares them with the expected
// slot: pulse number j of the train (j = 0 is CLK_pulse<T>, j = 1 is
// CLK_pulse<K>, ..., j = K is CLK_pulse<1>) starts at j*(T_DELAY + 2*T_INV)
// and ends T_DELAY + T_INV later. A monitor counts a failure whenever two
// pulses of one generator are high at the same time, and the test checks
// that each pulse fires exactly once per clock cycle. The clock starts only
// after the chains have settled from their arbitrary power-up state.
`timescale 1ns / 1ps
module tb_pulse_clock_gen;

  localparam realtime T_DELAY = 2.0ns;
  localparam realtime T_INV   = 0.5ns;
  localparam realtime STEP    = T_DELAY + 2 * T_INV;
  localparam realtime WIDTH   = T_DELAY + T_INV;
  localparam realtime HALF    = 17.857ns;
  localparam int      CYCLES  = 12;

  logic        clk = 1'b0;
  logic        pt4, pt8;
  logic [3:0]  p4;
  logic [7:0]  p8;
  int          checks = 0, failures = 0;
  realtime     t_edge = 0.0;
  logic        started = 1'b0;   // ignore settling of the chain before the first edge

  pulse_clock_gen #(.K(4), .T_DELAY(T_DELAY), .T_INV(T_INV)) dut4 (
    .clk(clk), .pulse_t(pt4), .pulse(p4));
  pulse_clock_gen #(.K(8), .T_DELAY(T_DELAY), .T_INV(T_INV)) dut8 (
    .clk(clk), .pulse_t(pt8), .pulse(p8));

  // train slot j -> the wires, in time order
  logic [4:0] train4;
  logic [8:0] train8;
  always_comb begin
    train4[0] = pt4;
    for (int k = 0; k < 4; k++) train4[4-k] = p4[k];
    train8[0] = pt8;
    for (int k = 0; k < 8; k++) train8[8-k] = p8[k];
  end

  int count4 [5];
  int count8 [9];

  task automatic check_time(input realtime got, input realtime exp, input string what, input int j);
    checks++;
    if (got < exp - 0.01 || got > exp + 0.01) begin
      failures++;
      $display("FAIL %s of slot %0d: %0.3f ns after clock edge, expected %0.3f ns", what, j, got, exp);
    end
  endtask

  for (genvar j = 0; j < 5; j++) begin : g_mon4
    always @(posedge train4[j]) if (started) begin
      count4[j]++;
      check_time($realtime - t_edge, j * STEP, "K=4 pulse start", j);
    end
    always @(negedge train4[j]) if (started) check_time($realtime - t_edge, j * STEP + WIDTH, "K=4 pulse end", j);
  end
  for (genvar j = 0; j < 9; j++) begin : g_mon8
    always @(posedge train8[j]) if (started) begin
      count8[j]++;
      check_time($realtime - t_edge, j * STEP, "K=8 pulse start", j);
    end
    always @(negedge train8[j]) if (started) check_time($realtime - t_edge, j * STEP + WIDTH, "K=8 pulse end", j);
  end

  // non-overlap: at most one pulse of a generator may be high
  always @(train4 or train8) begin
    if (started && ($countones(train4) > 1 || $countones(train8) > 1)) begin
      failures++;
      $display("FAIL overlapping pulses %b / %b at %0t", train4, train8, $time);
    end
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // the pulses themselves are checked only from the first clock edge on
    foreach (count4[j]) count4[j] = 0;
    foreach (count8[j]) count8[j] = 0;
    // the delay chains start from arbitrary values; let them settle (9 stages
    // of 3 ns for K=8) before the first clock edge
    #(4 * HALF);
    for (int i = 0; i < CYCLES; i++) begin
      clk = 1'b1; t_edge = $realtime; started = 1'b1;
      #(HALF);
      clk = 1'b0;
      #(HALF);
    end
    for (int j = 0; j < 5; j++) begin
      checks++;
      if (count4[j] != CYCLES) begin
        failures++;
        $display("FAIL K=4 slot %0d fired %0d times in %0d cycles", j, count4[j], CYCLES);
      end
    end
    for (int j = 0; j < 9; j++) begin
      checks++;
      if (count8[j] != CYCLES) begin
        failures++;
        $display("FAIL K=8 slot %0d fired %0d times in %0d cycles", j, count8[j], CYCLES);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
