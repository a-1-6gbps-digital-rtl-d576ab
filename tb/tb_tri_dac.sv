// tb_tri_dac: checks the three-level DAC model's code-to-current map:
// DN (-1) gives 0, no flag gives I_UNIT, UP (+1) gives 2*I_UNIT, and the
// unused both-flags code behaves as 0. Run with the default unit current
// and with a second instance at three times that, as used for the
// integral path.
module tb_tri_dac;
  import dcdr_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  tri_t code = TRI_ZERO;
  real  i_a, i_b;
  int checks = 0, failures = 0;

  tri_dac                   dut_a (.code, .i_o(i_a));
  tri_dac #(.I_UNIT(30e-6)) dut_b (.code, .i_o(i_b));

  initial begin
    #(1_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(tri_t c, real want_a);
    code = c;
    #10;
    checks++;
    if (i_a < want_a - 1e-12 || i_a > want_a + 1e-12 ||
        i_b < 3.0 * want_a - 1e-12 || i_b > 3.0 * want_a + 1e-12) begin
      failures++;
      $display("code %b: %e %e A, expected %e %e", c, i_a, i_b, want_a, 3.0 * want_a);
    end
  endtask

  initial begin
    chk(TRI_DN, 0.0);
    chk(TRI_ZERO, 10e-6);
    chk(TRI_UP, 20e-6);
    chk(2'b11, 10e-6);
    chk(TRI_DN, 0.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
