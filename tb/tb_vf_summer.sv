// tb_vf_summer: checks the V_F node model. With both DAC currents at mid
// scale V_F must sit at V_MID; each extra microampere must add R_LOAD
// times that to V_F, whichever input it comes on.
module tb_vf_summer;
  timeunit 1ps; timeprecision 1fs;

  real i_p = 10e-6, i_i = 30e-6, vf;
  int checks = 0, failures = 0;

  vf_summer dut (.i_p, .i_i, .vf);

  initial begin
    #(1_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(real ip, real ii, real want);
    i_p = ip; i_i = ii;
    #10;
    checks++;
    if (vf < want - 1e-9 || vf > want + 1e-9) begin
      failures++;
      $display("i_p=%e i_i=%e: V_F=%f, expected %f", ip, ii, vf, want);
    end
  endtask

  initial begin
    chk(10e-6, 30e-6, 0.6);
    chk(20e-6, 30e-6, 0.61);
    chk(0.0,   30e-6, 0.59);
    chk(10e-6, 60e-6, 0.63);
    chk(10e-6, 0.0,   0.57);
    chk(20e-6, 60e-6, 0.64);
    chk(0.0,   0.0,   0.56);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
