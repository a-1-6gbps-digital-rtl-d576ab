// tb_error_checker: self-checking test of the PRBS error checker.
//
// The test generates PRBS7 and PRBS31 streams with its own shift-register
// generators, feeds them to the checker with a known number of flipped
// bits and checks that synchronisation happens after 7 or 31 bits, that
// the error count equals the number of flipped bits and that the bit count
// equals the number of bits compared. Feeding PRBS31 data while the checker
// is set to PRBS7 must give many errors.
module tb_error_checker;
  timeunit 1ps; timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b0, prbs31 = 1'b0, din = 1'b0;
  logic synced, err;
  logic [31:0] bits, errors;
  int checks = 0, failures = 0;

  error_checker dut (.clk, .rst_n, .clear, .en, .prbs31, .din, .synced, .err, .bits, .errors);

  always #500 clk = ~clk;

  initial begin
    #(100_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [6:0]  f7;   // reference generators
  logic [30:0] f31;

  function automatic logic fib7();
    logic b = f7[6] ^ f7[5];
    f7 = {f7[5:0], b};
    return b;
  endfunction

  function automatic logic fib31();
    logic b = f31[30] ^ f31[27];
    f31 = {f31[29:0], b};
    return b;
  endfunction

  task automatic run(bit data31, bit chk31, int n, int flips, bit expect_clean);
    int flipped = 0, sync_at = -1, k;
    @(negedge clk);
    prbs31 = chk31; clear = 1'b1;
    @(negedge clk);
    clear = 1'b0; en = 1'b1;
    for (int i = 0; i < n; i++) begin
      din = data31 ? fib31() : fib7();
      k = (i > 100 && flipped < flips && (i % 97) == 0);
      if (k) begin din = ~din; flipped++; end
      @(negedge clk);
      if (synced && sync_at < 0) sync_at = i + 1;
    end
    en = 1'b0;
    @(negedge clk);
    if (expect_clean) begin
      checks++;
      if (sync_at != (chk31 ? 31 : 7)) begin
        failures++;
        $display("synced after %0d bits", sync_at);
      end
      checks++;
      if (errors != flipped || bits != n - (chk31 ? 31 : 7)) begin
        failures++;
        $display("errors=%0d bits=%0d, expected %0d %0d", errors, bits, flipped,
                 n - (chk31 ? 31 : 7));
      end
    end else begin
      checks++;
      if (errors < n / 8) begin
        failures++;
        $display("mismatched polynomial gave only %0d errors", errors);
      end
    end
  endtask

  initial begin
    f7 = 7'h35; f31 = 31'h2345_6789;
    #2000 rst_n = 1'b1;
    run(1'b0, 1'b0, 2000, 0, 1'b1);
    run(1'b0, 1'b0, 3000, 5, 1'b1);
    run(1'b1, 1'b1, 3000, 0, 1'b1);
    run(1'b1, 1'b1, 5000, 9, 1'b1);
    run(1'b1, 1'b0, 2000, 0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
