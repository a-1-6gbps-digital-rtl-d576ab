// tb_bbpd: self-checking test of the bang-bang phase detector.
//
// A 1000 ps clock drives the detector. Random bits are applied with their
// transitions placed a chosen offset delta after the clock's falling edge
// (where the edge sampler looks). With delta > 0 the edge sampler still sees
// the old bit, so every transition must raise early; with delta < 0 it sees
// the new bit and every transition must raise late. With no transition both
// stay low. rdata must equal the bit from one clock earlier. Expected values
// come from the bit list and delta alone.
module tb_bbpd;
  import dcdr_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  localparam int NB = 400;
  localparam realtime T = 1000.0;

  logic rck = 1'b0, rst_n = 1'b0, din = 1'b0;
  logic rdata, early, late;
  tri_t pd;
  int checks = 0, failures = 0;
  int n_early = 0, n_late = 0;
  bit bits [NB];

  bbpd dut (.rck, .rst_n, .din, .rdata, .early, .late, .pd);

  always #(T/2) rck = ~rck;

  initial begin
    #(2_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(realtime delta);
    // bit k is on din from k*T + T/2 + delta - T to k*T + T/2 + delta,
    // i.e. centred on the rising edge at k*T (relative to t0)
    realtime t0;
    bit exp_e, exp_l;
    foreach (bits[i]) bits[i] = 1'($urandom);
    @(posedge rck);
    t0 = $realtime + 10*T;
    fork
      begin
        #(10*T - T/2 + delta);
        for (int k = 0; k < NB; k++) begin
          din = bits[k];
          #(T);
        end
      end
      begin
        // a quarter period after rising edge t0+(k+1)T the detector holds
        // d(n-1) = bits[k], d(n) = bits[k+1] and the edge sample between them
        #(11*T + T/4);
        for (int k = 0; k < NB - 2; k++) begin
          exp_e = (bits[k] != bits[k+1]) && (delta > 0);
          exp_l = (bits[k] != bits[k+1]) && (delta < 0);
          checks++;
          if (early !== exp_e || late !== exp_l || rdata !== bits[k] ||
              pd.up !== exp_l || pd.dn !== exp_e) begin
            failures++;
            $display("k=%0d delta=%0.1f: E=%b L=%b rdata=%b, expected %b %b %b",
                     k, delta, early, late, rdata, exp_e, exp_l, bits[k]);
          end
          n_early += int'(early);
          n_late  += int'(late);
          #(T);
        end
      end
    join
  endtask

  initial begin
    #(3*T) rst_n = 1'b1;
    run(100.0);    // transitions after the edge sample: clock early
    run(-100.0);   // transitions before the edge sample: clock late
    run(300.0);
    run(-300.0);
    checks++;
    if (n_early == 0 || n_late == 0) begin
      failures++;
      $display("early or late never seen: %0d %0d", n_early, n_late);
    end
    $display("early=%0d late=%0d", n_early, n_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
