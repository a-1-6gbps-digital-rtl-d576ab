// tb_dsm2: self-checking test of the second-order delta-sigma modulator at
// its full 11-bit input width.
//
// For a range of constant inputs x the modulator runs N cycles. With error
// feedback of (1 - z^-1)^2 the sum of (y*F - x) over any run telescopes to a
// few quantization errors, so |sum(y) - N*x/F| must stay below 2 when no
// clipping occurs: the average output tracks x/F to within 2/N. Going one
// step further, the running sum of that running sum equals the latest
// quantization error itself, so it must stay within the modulator's error
// bound (2F for these inputs) at every cycle: this
// is what separates a second-order modulator from a first-order one. Each
// run starts from reset so that the error history is zero. The output
// must never carry both flags, must not clip for |x| <= F/2, and the first
// difference of y must not be constant (shaped, not idle) for a non-integer
// input. Finally, a step of x is checked for a one-cycle registered path.
module tb_dsm2;
  import dcdr_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  localparam int IN_W = 11, F = 1 << (IN_W - 1), N = 2048;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [IN_W-1:0] x = '0;
  tri_t y;
  logic ovl;
  int checks = 0, failures = 0;
  int n_up = 0, n_dn = 0, n_zero = 0, n_ovl = 0;

  dsm2 dut (.clk, .rst_n, .x, .y, .ovl);

  always #1250 clk = ~clk;

  initial begin
    #(1_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int xv, bit expect_clean);
    int sum = 0, ovls = 0, toggles = 0, prev = 0, v, s1 = 0, s2 = 0, s2max = 0;
    real err;
    @(negedge clk) rst_n = 1'b0;
    x = IN_W'(xv);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      @(posedge clk);
      #1;
      checks++;
      if (y == 2'b11) begin
        failures++;
        $display("x=%0d: both flags set", xv);
      end
      v = int'(tri_value(y));
      sum += v;
      s1 += v * F - xv;
      s2 += s1;
      if (s2 > s2max) s2max = s2;
      if (-s2 > s2max) s2max = -s2;
      if (i > 0 && v != prev) toggles++;
      prev = v;
      ovls += int'(ovl);
      if (y == TRI_UP) n_up++; else if (y == TRI_DN) n_dn++; else n_zero++;
    end
    n_ovl += ovls;
    err = real'(sum) - real'(N) * real'(xv) / real'(F);
    checks++;
    if (expect_clean && (err > 2.5 || err < -2.5 || ovls != 0 || s2max > 2*F)) begin
      failures++;
      $display("x=%0d: sum=%0d expected %0.2f, %0d clips, second sum %0d", xv, sum,
               real'(N) * real'(xv) / real'(F), ovls, s2max);
    end
    if (xv % F != 0) begin
      checks++;
      if (toggles == 0) begin
        failures++;
        $display("x=%0d: output never changes", xv);
      end
    end
  endtask

  initial begin
    @(negedge clk);
    @(negedge clk) rst_n = 1'b1;
    foreach (int_list[i]) run(int_list[i], 1'b1);
    for (int k = 0; k < 20; k++) run(int'($urandom_range(F)) - F/2, 1'b1);
    // near full scale: must stay bounded, clipping allowed
    run(F - 1, 1'b0);
    run(-F, 1'b0);
    $display("up=%0d dn=%0d zero=%0d clipped=%0d", n_up, n_dn, n_zero, n_ovl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int int_list [] = '{0, 1, -1, 7, -7, 100, -100, 341, -341, 500, -512, 512};
endmodule
