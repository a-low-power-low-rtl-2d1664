// tb_sd_decimation_filter_full: one complete conversion through the filter
// exactly as built by default (no parameter overrides): N = 31 (FIR32),
// 15-bit output, decimation by M = 200, fed by the behavioural 2nd-order
// modulator with a slow sine and then a DC level.
//
// Every decimated word is compared with a value the testbench computes on
// its own from the bit stream: the sum over the last 32 section-2 values,
// each the sum over 32 section-1 values, each the clamped count of ones in
// 32 bits. Words must come exactly 200 clocks apart, and during the DC part
// they must sit within 2 % of full scale of p * 32^3 (p = density of ones).
module tb_sd_decimation_filter_full;
  import decim_pkg::*;

  localparam int L = 32;
  localparam int M = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [15:0] ain = '0;
  logic mod_bit;
  logic [4:0]  s1;
  logic [9:0]  s2;
  logic [14:0] full, dout;
  logic        valid, m_ok;
  logic [2:0]  sat;
  int checks = 0, failures = 0, words = 0, last_word = -1, cyc = 0, dc_checks = 0;

  // independent model state: section histories and sums
  int h1[$], h2[$], h3[$];
  int a1 = 0, a2 = 0, a3 = 0;

  always #5 clk = ~clk;

  sd_modulator_model u_mod (.clk, .rst_n, .ain_i(ain), .bit_o(mod_bit));

  sd_decimation_filter dut (
    .clk, .rst_n, .bit_i(mod_bit), .order_i(FIR32), .dec_factor_i(16'(M)),
    .sec1_o(s1), .sec2_o(s2), .full_o(full), .dout_o(dout), .valid_o(valid),
    .sat_o(sat), .m_ok_o(m_ok));

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int old(ref int q[$]);
    return (q.size() >= L) ? q[q.size() - L] : 0;
  endfunction

  initial begin
    int b, n_words_target;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    n_words_target = 60;
    while (words < n_words_target) begin
      // slow sine for the first half, then a DC level
      if (words < 30)
        ain = 16'($rtoi(0.6 * 32767.0 * $sin(2.0 * 3.14159265 * real'(cyc) / 4000.0)));
      else
        ain = 16'sd13107;   // u = 0.4
      b = int'(mod_bit);
      @(posedge clk);
      cyc++;
      begin
        int pre3;
        pre3 = a3;
        a3 = a3 + a2 - old(h3); h3.push_back(a2);
        a2 = a2 + a1 - old(h2); h2.push_back(a1);
        a1 = a1 + b; if (a1 > 31) a1 = 31;
        a1 = a1 - old(h1); if (a1 < 0) a1 = 0;
        h1.push_back(b);
        @(negedge clk);
        checks++;
        if (int'(full) != a3) begin
          failures++;
          $display("cycle %0d full %0d expected %0d", cyc, full, a3);
        end
        if (valid) begin
          words++;
          checks++;
          if (int'(dout) != pre3) begin
            failures++;
            $display("word %0d = %0d expected %0d", words, dout, pre3);
          end
          if (last_word >= 0) begin
            checks++;
            if (cyc - last_word != M) begin
              failures++;
              $display("word spacing %0d", cyc - last_word);
            end
          end
          last_word = cyc;
          if (words > 34) begin
            int expv;
            expv = int'(0.7 * real'(L * L * L));
            checks++;
            dc_checks++;
            if (int'(dout) < expv - 656 || int'(dout) > expv + 656) begin
              failures++;
              $display("DC word %0d, expected about %0d", dout, expv);
            end
          end
        end
      end
    end
    checks++;
    if (dc_checks == 0 || !m_ok) begin
      failures++;
      $display("no DC words checked or M < N+1 reported");
    end
    $display("decimated words %0d over %0d clocks", words, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
