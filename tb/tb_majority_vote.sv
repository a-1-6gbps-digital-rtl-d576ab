// tb_majority_vote: exhaustive test of the majority vote.
//
// All 256 combinations of four 2-bit decisions are applied, including the
// unused "both flags" code, which must count as 0. The expected vote comes
// from counting the pure UP and pure DN entries: UP if there are more UPs,
// DN if there are more DNs, 0 on a tie.
module tb_majority_vote;
  import dcdr_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  tri_t [3:0] word;
  tri_t vote;
  int checks = 0, failures = 0;
  int n_up = 0, n_dn = 0, n_zero = 0;

  majority_vote dut (.word, .vote);

  initial begin
    #(1_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ups, dns;
    tri_t exp_v;
    for (int c = 0; c < 256; c++) begin
      word = 8'(c);
      #10;
      ups = 0; dns = 0;
      for (int i = 0; i < 4; i++) begin
        if (word[i] == 2'b10) ups++;
        if (word[i] == 2'b01) dns++;
      end
      exp_v = (ups > dns) ? TRI_UP : (dns > ups) ? TRI_DN : TRI_ZERO;
      checks++;
      if (vote !== exp_v) begin
        failures++;
        $display("word=%b vote=%b expected %b", word, vote, exp_v);
      end
      if (exp_v == TRI_UP) n_up++; else if (exp_v == TRI_DN) n_dn++; else n_zero++;
    end
    $display("up=%0d dn=%0d zero=%0d", n_up, n_dn, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
