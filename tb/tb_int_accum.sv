// tb_int_accum: self-checking test of the integral accumulator at its
// full 14-bit size.
//
// Random runs of +1, 0 and -1 are applied, long enough to drive the
// accumulator into both limits. A reference integer, clamped to the signed
// 14-bit range, gives the expected accumulator; the output word must be the
// reference shifted right by 3 (floor), and sat must be high exactly at a
// limit. The accumulator must move by one per clock, the design's rate.
module tb_int_accum;
  import dcdr_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  localparam int ACC_W = 14, DROP_W = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  tri_t inc = TRI_ZERO;
  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-DROP_W-1:0] frac;
  logic sat;
  int checks = 0, failures = 0;
  int ref_acc = 0, n_sat_hi = 0, n_sat_lo = 0;

  int_accum dut (.clk, .rst_n, .inc, .acc, .frac, .sat);

  always #2500 clk = ~clk;

  initial begin
    #(500_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(tri_t t);
    inc = t;
    @(posedge clk);
    if (t == TRI_UP) ref_acc = (ref_acc < 8191) ? ref_acc + 1 : 8191;
    if (t == TRI_DN) ref_acc = (ref_acc > -8192) ? ref_acc - 1 : -8192;
    @(negedge clk);
    checks++;
    if (int'(acc) != ref_acc || int'(frac) != (ref_acc >>> 3) ||
        sat !== (ref_acc == 8191 || ref_acc == -8192)) begin
      failures++;
      if (failures < 10)
        $display("acc=%0d frac=%0d sat=%b, expected %0d %0d", acc, frac, sat,
                 ref_acc, ref_acc >>> 3);
    end
    if (ref_acc == 8191) n_sat_hi++;
    if (ref_acc == -8192) n_sat_lo++;
  endtask

  initial begin
    @(negedge clk);
    @(negedge clk) rst_n = 1'b1;
    checks++;
    if (acc != 0) failures++;
    // mixed random steps
    repeat (2000) begin
      case ($urandom_range(2))
        0: step(TRI_UP);
        1: step(TRI_DN);
        default: step(TRI_ZERO);
      endcase
    end
    // run into the top, then the bottom limit
    repeat (10000) step(($urandom_range(9) == 0) ? TRI_ZERO : TRI_UP);
    repeat (20000) step(($urandom_range(9) == 0) ? TRI_ZERO : TRI_DN);
    repeat (300)   step(TRI_UP);
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0) begin
      failures++;
      $display("a limit was never reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
