// tb_pulsed_latch: self-checking test of the single pulsed latch.
//
// Checks that the asynchronous clear works, that q follows d while the pulse
// is high (including a change of d inside the pulse), and that q holds its
// value after the pulse falls whatever d does. Expected values come from a
// separate variable updated by the test itself.
`timescale 1ns / 1ps
module tb_pulsed_latch;

  logic rst_n, pulse, d, q;
  int   checks = 0, failures = 0;
  logic expect_q;

  pulsed_latch dut (.rst_n(rst_n), .pulse(pulse), .d(d), .q(q));

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b at %0t", what, q, exp, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; pulse = 1'b0; d = 1'b1;
    #1 check(1'b0, "reset clears");
    pulse = 1'b1;
    #1 check(1'b0, "reset overrides pulse");
    pulse = 1'b0;
    rst_n = 1'b1;
    #1 check(1'b0, "holds after reset release");
    expect_q = 1'b0;
    for (int i = 0; i < 400; i++) begin
      d = 1'($urandom);
      #1;
      check(expect_q, "closed latch holds");
      pulse = 1'b1;
      #1;
      expect_q = d;
      check(expect_q, "open latch follows d");
      if ($urandom_range(0, 1) == 1) begin
        d = ~d;
        #1;
        expect_q = d;
        check(expect_q, "open latch follows change inside pulse");
      end
      pulse = 1'b0;
      #1;
      d = ~d;
      #1;
      check(expect_q, "value kept after pulse falls");
    end
    rst_n = 1'b0;
    #1 check(1'b0, "reset while holding");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
