// tb_pd_demux: self-checking test of the 1:4 phase-decision de-multiplexer.
//
// Random three-level decisions are applied, one per recovered-clock cycle.
// A reference history of every applied decision gives the expected word:
// after rising edge e (counted from reset), the word must hold the four
// decisions applied at edges L-3..L, L being the last multiple of 4 not
// above e, newest in word[0]. The quarter-rate clock must be the MSB of a
// count of edges modulo 4, i.e. exactly one period per four rck periods.
module tb_pd_demux;
  import dcdr_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic rck = 1'b0, rst_n = 1'b0;
  tri_t pd = TRI_ZERO;
  logic clk_q;
  tri_t [3:0] word;
  int checks = 0, failures = 0;
  tri_t hist [0:2047];
  int e = 0;  // rising edges since reset
  int q_rises = 0;

  pd_demux dut (.rck, .rst_n, .pd, .clk_q, .word);

  always #500 rck = ~rck;
  always @(posedge clk_q) q_rises++;

  initial begin
    #(5_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic tri_t rnd_tri();
    case ($urandom_range(2))
      0: return TRI_UP;
      1: return TRI_DN;
      default: return TRI_ZERO;
    endcase
  endfunction

  initial begin
    tri_t [3:0] exp_w;
    int l;
    @(negedge rck);
    @(negedge rck) rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      pd = rnd_tri();
      @(posedge rck);
      e++;
      hist[e] = pd;
      @(negedge rck);
      // counter value after e edges is e mod 4
      checks++;
      if (clk_q !== ((e % 4) >= 2)) begin
        failures++;
        $display("edge %0d: clk_q=%b", e, clk_q);
      end
      l = (e / 4) * 4;
      if (l >= 4) begin
        for (int j = 0; j < 4; j++) exp_w[j] = hist[l-j];
        checks++;
        if (word !== exp_w) begin
          failures++;
          $display("edge %0d: word=%h expected %h", e, word, exp_w);
        end
      end
    end
    checks++;
    if (q_rises < 499 || q_rises > 500) begin
      failures++;
      $display("clk_q rose %0d times in 2000 rck cycles", q_rises);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
