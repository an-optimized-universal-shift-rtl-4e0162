// tb_pulsed_latch_usr: end-to-end test of the universal shift register at
// its default size (256 bits in 4-bit sub shift registers).
//
// A 28 MHz clock drives the register. Inputs change on the falling clock
// edge, or once the pulse train that follows each rising edge has ended if
// that is later.
// For every cycle the test picks a mode, parallel word and serial inputs at
// random (with runs of long shifts so that bits travel across many sub
// register boundaries) and updates a 256-bit reference model of the
// intended operation. It then checks that:
//   * SR has not changed just before the rising edge (the previous result
//     holds), and
//   * SR equals the reference once the train has ended, 14.5 ns after the
//     edge, so every operation completes within one clock cycle.
// It also checks the asynchronous clear at the start and in the middle of
// the run, and counts how often each mechanism occurred: hold, shift right,
// shift left, parallel load, a 1 entering from either serial input, a 1
// carried across a sub register boundary by a temporary latch in each
// direction, and reset. A mechanism that never occurred counts as a failure.
`timescale 1ns / 1ps
module tb_pulsed_latch_usr;
  import usr_pkg::*;

  localparam int      N      = 256;
  localparam int      K      = 4;
  localparam realtime HALF   = 17.857ns;           // 28 MHz
  localparam realtime TRAIN  = (K + 1) * 3.0ns - 0.5ns;
  localparam realtime T_CMP  = (TRAIN + 0.1ns > HALF) ? TRAIN + 0.1ns : HALF;
  localparam int      CYCLES = 3000;

  logic         clk = 1'b0;
  logic         rst_n, s0, s1, in, in1;
  logic [N-1:0] I, SR;

  logic [N-1:0] ref_sr;
  int           checks = 0, failures = 0;
  int           n_hold = 0, n_shr = 0, n_shl = 0, n_load = 0, n_reset = 0;
  int           n_in = 0, n_in1 = 0, n_cross_r = 0, n_cross_l = 0;

  pulsed_latch_usr dut (
    .clk(clk), .rst_n(rst_n), .s0(s0), .s1(s1), .in(in), .in1(in1), .I(I), .SR(SR));

  task automatic compare(input string what, input int cyc);
    checks++;
    if (SR !== ref_sr) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s cycle %0d:\n  got %h\n  exp %h", what, cyc, SR, ref_sr);
    end
  endtask

  // count boundary crossings of ones in the reference model
  function automatic int crossings_r(input logic [N-1:0] old_sr);
    int c = 0;
    for (int m = 0; m < N / K - 1; m++) if (old_sr[m*K + K - 1]) c++;
    return c;
  endfunction
  function automatic int crossings_l(input logic [N-1:0] old_sr);
    int c = 0;
    for (int m = 1; m < N / K; m++) if (old_sr[m*K]) c++;
    return c;
  endfunction

  initial begin
    #(2 * CYCLES * HALF * 1.2 + 10000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    usr_mode_e mode;
    int        run_left = 0;
    usr_mode_e run_mode = MODE_HOLD;

    rst_n = 1'b0; s0 = 1'b0; s1 = 1'b0; in = 1'b0; in1 = 1'b0; I = '0;
    ref_sr = '0;
    #(T_CMP);
    n_reset++;
    compare("reset", -1);
    rst_n = 1'b1;

    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      // falling edge phase: choose the next operation
      if (run_left > 0) begin
        mode = run_mode;
        run_left--;
      end else if ($urandom_range(0, 9) == 0) begin
        run_mode = ($urandom_range(0, 1) == 1) ? MODE_SHR : MODE_SHL;
        run_left = $urandom_range(20, 120);
        mode     = run_mode;
      end else begin
        mode = usr_mode_e'($urandom_range(0, 3));
      end
      {s1, s0} = mode;
      in  = 1'($urandom);
      in1 = 1'($urandom);
      for (int w = 0; w < N / 32; w++) I[w*32 +: 32] = $urandom;

      // mid-run reset, once
      if (cyc == CYCLES / 2) begin
        rst_n = 1'b0;
        #1;
        ref_sr = '0;
        n_reset++;
        compare("mid-run reset", cyc);
        rst_n = 1'b1;
      end

      #(2 * HALF - T_CMP - 0.2);
      compare("value held before edge", cyc);
      #0.2;

      case (mode)
        MODE_HOLD: n_hold++;
        MODE_SHR: begin
          n_shr++;
          if (in) n_in++;
          n_cross_r += crossings_r(ref_sr);
          ref_sr = {ref_sr[N-2:0], in};
        end
        MODE_SHL: begin
          n_shl++;
          if (in1) n_in1++;
          n_cross_l += crossings_l(ref_sr);
          ref_sr = {in1, ref_sr[N-1:1]};
        end
        MODE_LOAD: begin
          n_load++;
          ref_sr = I;
        end
      endcase

      clk = 1'b1;
      #(HALF);
      clk = 1'b0;
      if (T_CMP > HALF) #(T_CMP - HALF);
      compare(mode.name(), cyc);
    end

    $display("mechanisms: hold=%0d shift_right=%0d shift_left=%0d load=%0d reset=%0d",
             n_hold, n_shr, n_shl, n_load, n_reset);
    $display("            serial_in_right=%0d serial_in_left=%0d boundary_right=%0d boundary_left=%0d",
             n_in, n_in1, n_cross_r, n_cross_l);
    if (n_hold == 0)    begin checks++; failures++; $display("FAIL hold never occurred"); end
    if (n_shr == 0)     begin checks++; failures++; $display("FAIL shift right never occurred"); end
    if (n_shl == 0)     begin checks++; failures++; $display("FAIL shift left never occurred"); end
    if (n_load == 0)    begin checks++; failures++; $display("FAIL load never occurred"); end
    if (n_reset < 2)    begin checks++; failures++; $display("FAIL reset did not occur twice"); end
    if (n_in == 0)      begin checks++; failures++; $display("FAIL serial input right never used"); end
    if (n_in1 == 0)     begin checks++; failures++; $display("FAIL serial input left never used"); end
    if (n_cross_r == 0) begin checks++; failures++; $display("FAIL no boundary crossing to the right"); end
    if (n_cross_l == 0) begin checks++; failures++; $display("FAIL no boundary crossing to the left"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
