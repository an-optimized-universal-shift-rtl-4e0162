// tb_usr_mux4: exhaustive test of the latch input multiplexer.
//
// Applies every mode with every combination of the four data inputs and
// compares the output with the input that mode must select.
`timescale 1ns / 1ps
module tb_usr_mux4;
  import usr_pkg::*;

  usr_mode_e mode;
  logic own, from_lo, from_hi, par, y, exp;
  int   checks = 0, failures = 0;

  usr_mux4 dut (.mode(mode), .own(own), .from_lo(from_lo), .from_hi(from_hi),
                .par(par), .y(y));

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++) begin
      for (int v = 0; v < 16; v++) begin
        mode    = usr_mode_e'(m);
        own     = v[0];
        from_lo = v[1];
        from_hi = v[2];
        par     = v[3];
        #1;
        case (m)
          0: exp = v[0];
          1: exp = v[1];
          2: exp = v[2];
          default: exp = v[3];
        endcase
        checks++;
        if (y !== exp) begin
          failures++;
          $display("FAIL mode=%0d inputs=%b y=%0b expected %0b", m, v[3:0], y, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
