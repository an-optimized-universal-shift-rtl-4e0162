// tb_usr_sub_shift_register: test of one 4-bit universal sub shift register.
//
// The test generates the pulse train itself (CLK_pulse<T> first, then
// CLK_pulse<4> down to CLK_pulse<1>, non-overlapping) and applies random
// modes, parallel data and neighbour bits. After each train it compares the
// four stored bits and the temporary latch with a reference model written
// from the intended operation: hold keeps the bits, shift right moves
// q[i-1] into q[i] and t_lo into q[0], shift left moves q[i+1] into q[i] and
// t_hi into q[3], load takes par; the temporary latch takes the bit that
// leaves the sub register (q[0] for shift left, q[3] otherwise).
`timescale 1ns / 1ps
module tb_usr_sub_shift_register;
  import usr_pkg::*;

  localparam int K = 4;

  logic         rst_n;
  usr_mode_e    mode;
  logic         pulse_t;
  logic [K-1:0] pulse;
  logic [K-1:0] par;
  logic         t_lo, t_hi;
  logic [K-1:0] q;
  logic         t;

  logic [K-1:0] exp_q;
  logic         exp_t;
  int           checks = 0, failures = 0;
  int           n_mode [4];

  usr_sub_shift_register #(.K(K)) dut (
    .rst_n(rst_n), .mode(mode), .pulse_t(pulse_t), .pulse(pulse), .par(par),
    .t_lo(t_lo), .t_hi(t_hi), .q(q), .t(t));

  task automatic one_pulse(input int slot);
    if (slot == 0) pulse_t = 1'b1; else pulse[K-slot] = 1'b1;
    #2.5;
    pulse_t = 1'b0;
    pulse   = '0;
    #0.5;
  endtask

  task automatic train();
    for (int j = 0; j <= K; j++) one_pulse(j);
  endtask

  task automatic compare(input string what);
    checks++;
    if (q !== exp_q || t !== exp_t) begin
      failures++;
      $display("FAIL %s: q=%b t=%b expected q=%b t=%b", what, q, t, exp_q, exp_t);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_mode[i]) n_mode[i] = 0;
    rst_n = 1'b0; pulse_t = 1'b0; pulse = '0; mode = MODE_HOLD;
    par = '0; t_lo = 1'b0; t_hi = 1'b0;
    #5;
    exp_q = '0; exp_t = 1'b0;
    compare("after reset");
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      mode = usr_mode_e'($urandom_range(0, 3));
      par  = K'($urandom);
      t_lo = 1'($urandom);
      t_hi = 1'($urandom);
      #1;
      n_mode[mode]++;
      case (mode)
        MODE_HOLD: begin exp_t = exp_q[K-1]; end
        MODE_SHR:  begin exp_t = exp_q[K-1]; exp_q = {exp_q[K-2:0], t_lo}; end
        MODE_SHL:  begin exp_t = exp_q[0];   exp_q = {t_hi, exp_q[K-1:1]}; end
        MODE_LOAD: begin exp_t = exp_q[K-1]; exp_q = par; end
      endcase
      train();
      #1;
      compare(mode.name());
    end
    rst_n = 1'b0;
    #1;
    exp_q = '0; exp_t = 1'b0;
    compare("reset after use");
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (n_mode[m] == 0) begin
        failures++;
        $display("FAIL mode %0d never exercised", m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
