// tb_output_decimator: self-checking test of the output down-sampler.
//
// The data input is a free-running count, so every captured word tells in
// which clock it was taken. For several factors M (including 0, 1, a value
// below the window length, and 200) the test checks that valid pulses come
// exactly M clocks apart, that each output word is the input of the clock
// before the pulse, that successive words differ by M, that m_ok reports
// M >= L, and that the window-start pulse precedes each capture by exactly
// L clocks (L + 1 clocks before the valid pulse).
module tb_output_decimator;
  import decim_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  fir_order_e order;
  logic [15:0] m;
  logic [14:0] din, dout;
  logic valid, wstart, m_ok;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  output_decimator dut (.clk, .rst_n, .dec_factor_i(m), .order_i(order), .din_i(din),
                        .dout_o(dout), .valid_o(valid), .win_start_o(wstart), .m_ok_o(m_ok));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) din <= '0;
    else        din <= din + 15'd1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(input int mval, input fir_order_e ord);
    int m_eff, len, cyc, last_valid, last_start, nvalid, prev_word;
    m_eff = (mval == 0) ? 1 : mval;
    len = win_len(ord);
    m = 16'(mval);
    order = ord;
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    last_valid = -1; last_start = -1; nvalid = 0; prev_word = -1;
    for (cyc = 0; cyc < 6 * m_eff + 50; cyc++) begin
      @(negedge clk);
      checks++;
      if (m_ok !== (m_eff >= len)) begin
        failures++;
        $display("M=%0d L=%0d m_ok=%0b", mval, len, m_ok);
      end
      if (valid) begin
        nvalid++;
        // the word was captured in the previous clock, whose din is din-1
        checks++;
        if (dout !== din - 15'd1) begin
          failures++;
          $display("M=%0d dout=%0d expected %0d", mval, dout, din - 15'd1);
        end
        if (last_valid >= 0) begin
          checks += 2;
          if (cyc - last_valid != m_eff) begin
            failures++;
            $display("M=%0d valid spacing %0d", mval, cyc - last_valid);
          end
          if (int'(dout) - prev_word != m_eff) begin
            failures++;
            $display("M=%0d word step %0d", mval, int'(dout) - prev_word);
          end
        end
        if (m_eff >= len && nvalid > 1) begin
          checks++;
          if (cyc - last_start != len + 1 && !(m_eff == len && cyc - last_start == 1)) begin
            failures++;
            $display("M=%0d L=%0d start-to-valid %0d", mval, len, cyc - last_start);
          end
        end
        last_valid = cyc;
        prev_word = int'(dout);
      end
      if (wstart) begin
        if (m_eff < len) begin
          checks++; failures++;
          $display("window start with M < L");
        end
        last_start = cyc;
      end
    end
    checks++;
    if (nvalid < 5) begin
      failures++;
      $display("M=%0d only %0d outputs", mval, nvalid);
    end
  endtask

  initial begin
    run_case(0, FIR32);
    run_case(1, FIR8);
    run_case(4, FIR16);
    run_case(7, FIR8);
    run_case(8, FIR8);
    run_case(16, FIR16);
    run_case(33, FIR32);
    run_case(100, FIR32);
    run_case(200, FIR32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
