// tb_integral_ctrl: self-checking test of the complete integral path at its
// default sizes (14-bit accumulator, 3 LSBs dropped, 11-bit modulator).
//
// Phase decisions are fed at full rate in repeating patterns whose every
// four-bit window has a known majority:
//   UP,UP,UP,DN  -> every vote is UP: the accumulator must rise by exactly
//                   one per quarter-rate cycle, i.e. once per four rck cycles
//   UP,UP,DN,DN  -> every vote is 0: the accumulator must hold
//   DN,DN,DN,ZERO-> every vote is DN: the accumulator must fall by one per
//                   quarter-rate cycle
// While the accumulator holds, the average IDAC code over 4096 quarter-rate
// cycles must equal (acc >> 3) / 1024 to within 3/4096.
// A second copy with DSM_DIV = 8 (modulator at rck/8) gets the same
// decisions: its accumulator must match the first copy's, its IDAC code
// may change only at multiples of eight rck cycles (after the first
// change), and its average code over the same window must equal
// (acc >> 3) / 1024 to within 4/2048.
module tb_integral_ctrl;
  import dcdr_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic rck = 1'b0, rst_n = 1'b1;
  tri_t pd = TRI_ZERO;
  logic clk_q, sat, dsm_ovl;
  tri_t vote, idac;
  logic signed [13:0] acc;
  int checks = 0, failures = 0;
  int n_vote_up = 0, n_vote_dn = 0, n_vote_zero = 0;
  tri_t pat [4];
  int ph = 0;

  integral_ctrl dut (.rck, .rst_n, .pd, .clk_q, .vote, .acc, .sat, .idac, .dsm_ovl);

  logic clk_q8, sat8, dsm_ovl8;
  tri_t vote8, idac8;
  logic signed [13:0] acc8;
  integral_ctrl #(.DSM_DIV(8)) dut8 (
    .rck, .rst_n, .pd, .clk_q(clk_q8), .vote(vote8), .acc(acc8), .sat(sat8),
    .idac(idac8), .dsm_ovl(dsm_ovl8)
  );

  // DSM_DIV = 8 copy: code changes only every eighth rck cycle, and the
  // accumulator follows the first copy's
  int   n_bad_spacing = 0, n_acc_diff = 0, n_idac8_change = 0;
  int   since_change = 0;
  tri_t idac8_last = TRI_ZERO;
  always @(posedge rck) begin
    #1;
    since_change++;
    if (idac8 != idac8_last) begin
      n_idac8_change++;
      if (n_idac8_change > 1 && since_change % 8 != 0) n_bad_spacing++;
      since_change = 0;
      idac8_last = idac8;
    end
    if (acc8 != acc) n_acc_diff++;
  end

  always #312.5 rck = ~rck;   // 1.6 GHz

  // pattern generator, one decision per rck cycle
  always @(negedge rck) begin
    pd <= pat[ph];
    ph <= (ph + 1) % 4;
  end

  always @(posedge clk_q) begin
    if (vote == TRI_UP) n_vote_up++;
    else if (vote == TRI_DN) n_vote_dn++;
    else n_vote_zero++;
  end

  initial begin
    #(200_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_pat(tri_t a, tri_t b, tri_t c, tri_t d);
    pat[0] = a; pat[1] = b; pat[2] = c; pat[3] = d;
  endtask

  // run n quarter-rate cycles and check the accumulator slope
  task automatic slope(int n, int per_q, string what);
    int a0, rck_cycles = 0;
    repeat (4) @(posedge clk_q);   // let the new pattern reach the accumulator
    a0 = int'(acc);
    fork
      begin : count
        forever begin @(posedge rck); rck_cycles++; end
      end
    join_none
    repeat (n) @(posedge clk_q);
    disable fork;
    $display("%s: acc %0d -> %0d", what, a0, int'(acc));
    checks++;
    if (int'(acc) - a0 != per_q * n) begin
      failures++;
      $display("%s: acc moved %0d in %0d quarter cycles, expected %0d",
               what, int'(acc) - a0, n, per_q * n);
    end
    checks++;
    if (rck_cycles != 4 * n) begin
      failures++;
      $display("%s: %0d rck cycles for %0d quarter cycles", what, rck_cycles, n);
    end
  endtask

  task automatic average(int n);
    int sum = 0, sum8 = 0;
    real want, got, got8;
    repeat (4) @(posedge clk_q);
    for (int i = 0; i < n; i++) begin
      @(posedge clk_q);
      #1;
      sum += int'(tri_value(idac));
      if (i % 2 == 0) sum8 += int'(tri_value(idac8));
    end
    want = real'(int'(acc) >>> 3) / 1024.0;
    got  = real'(sum) / real'(n);
    got8 = real'(sum8) / real'(n / 2);
    checks++;
    if (got8 - want > 4.0 / (n / 2) || want - got8 > 4.0 / (n / 2)) begin
      failures++;
      $display("DSM_DIV=8: average IDAC code %f, expected %f", got8, want);
    end
    checks++;
    if (got - want > 3.0 / n || want - got > 3.0 / n) begin
      failures++;
      $display("average IDAC code %f, expected %f", got, want);
    end
    $display("acc=%0d average IDAC code %f (expected %f)", acc, got, want);
  endtask

  initial begin
    set_pat(TRI_ZERO, TRI_ZERO, TRI_ZERO, TRI_ZERO);
    #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts at once
    #(3000) rst_n = 1'b1;
    set_pat(TRI_UP, TRI_UP, TRI_UP, TRI_DN);
    slope(2000, 1, "up");
    set_pat(TRI_UP, TRI_UP, TRI_DN, TRI_DN);
    slope(500, 0, "hold");
    average(4096);
    set_pat(TRI_DN, TRI_DN, TRI_DN, TRI_ZERO);
    slope(3000, -1, "down");
    set_pat(TRI_DN, TRI_UP, TRI_DN, TRI_UP);
    average(4096);
    checks++;
    if (n_bad_spacing != 0 || n_idac8_change < 100) begin
      failures++;
      $display("DSM_DIV=8: %0d code changes, %0d not on an eighth rck cycle",
               n_idac8_change, n_bad_spacing);
    end
    checks++;
    if (n_acc_diff != 0) begin
      failures++;
      $display("DSM_DIV=8: accumulator differed from the first copy %0d times", n_acc_diff);
    end
    checks++;
    if (n_vote_up == 0 || n_vote_dn == 0 || n_vote_zero == 0) begin
      failures++;
      $display("a vote value never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
