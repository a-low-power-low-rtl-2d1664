// tb_boxcar_section: self-checking test of one moving-sum filter section.
//
// Two instances are driven: a first-section one (1-bit in, 5-bit out) and a
// middle-section one (5-bit in, 10-bit out). For the wide one the expected
// output is the plain sum of the last L inputs, taken from the testbench's
// own sample history. For the 1-bit one the expected value follows the
// overflow rule (clamp to 31 after adding, to 0 after subtracting); runs of
// ones longer than the window force the clamp, which must be seen at least
// once, and the output must return to the exact window sum after a run of
// zeros. With a 32-sample window of ones the clamp-then-subtract order
// settles at 30 (31 after the clamped add, minus the leaving one). The result appears one clock after each sample (registered).
module tb_boxcar_section;
  import decim_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  fir_order_e order;
  logic       b_in;
  logic [4:0] w_in;
  logic [4:0] s1;
  logic [9:0] s2;
  logic       sat1, sat2;
  int checks = 0, failures = 0, sat_events = 0, exact_after_sat = 0;
  logic       hb[$];
  logic [4:0] hw[$];

  always #5 clk = ~clk;

  boxcar_section #(.IN_W(1), .OUT_W(5))  dut1 (.clk, .rst_n, .order_i(order), .din_i(b_in), .sum_o(s1), .sat_o(sat1));
  boxcar_section #(.IN_W(5), .OUT_W(10)) dut2 (.clk, .rst_n, .order_i(order), .din_i(w_in), .sum_o(s2), .sat_o(sat2));

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wsum_b(int len);
    int s = 0;
    for (int k = 0; k < len && k < hb.size(); k++) s += hb[hb.size()-1-k];
    return s;
  endfunction

  function automatic int wsum_w(int len);
    int s = 0;
    for (int k = 0; k < len && k < hw.size(); k++) s += hw[hw.size()-1-k];
    return s;
  endfunction

  initial begin
    fir_order_e ords[3] = '{FIR8, FIR16, FIR32};
    b_in = 1'b0; w_in = '0;
    foreach (ords[o]) begin
      int len, ref1, ones_run;
      order = ords[o];
      len = win_len(order);
      rst_n = 1'b0;
      hb.delete(); hw.delete();
      ref1 = 0;
      repeat (3) @(negedge clk);
      rst_n = 1'b1;
      for (int t = 0; t < 1200; t++) begin
        int phase, lb;
        phase = t / 100;
        // phases: random, long run of ones, long run of zeros, random ...
        case (phase % 4)
          1:       b_in = 1'b1;
          2:       b_in = 1'b0;
          default: b_in = 1'($urandom);
        endcase
        w_in = 5'($urandom);
        lb = (hb.size() >= len) ? int'(hb[hb.size()-len]) : 0;
        // first-section rule: clamp after the add, then after the subtract
        ref1 = ref1 + int'(b_in);
        if (ref1 > 31) ref1 = 31;
        ref1 = ref1 - lb;
        if (ref1 < 0) ref1 = 0;
        @(posedge clk);
        hb.push_back(b_in);
        hw.push_back(w_in);
        @(negedge clk);
        checks += 2;
        if (int'(s1) != ref1) begin
          failures++;
          $display("%s t=%0d sec1 out=%0d expected %0d", order.name(), t, s1, ref1);
        end
        if (int'(s2) != wsum_w(len)) begin
          failures++;
          $display("%s t=%0d sec2 out=%0d expected %0d", order.name(), t, s2, wsum_w(len));
        end
        if (len < 32) begin
          // shorter windows never exceed 31: the section is an exact moving sum
          checks++;
          if (int'(s1) != wsum_b(len)) begin
            failures++;
            $display("%s t=%0d sec1 not exact", order.name(), t);
          end
        end
        if (sat1) sat_events++;
        if (sat2) begin
          failures++;
          $display("wide section reported a clamp");
        end
        // end of a zero run: everything must be back to the exact sum
        if (phase % 4 == 2 && t % 100 == 99) begin
          checks++;
          exact_after_sat++;
          if (int'(s1) != wsum_b(len) || s1 != 0) begin
            failures++;
            $display("%s not resynchronised after zero run", order.name());
          end
        end
        // in the middle of a ones run the first section sits at its top value
        if (phase % 4 == 1 && t % 100 == 99) begin
          checks++;
          if (int'(s1) != ((len == 32) ? 30 : len)) begin
            failures++;
            $display("%s ones run: out=%0d", order.name(), s1);
          end
        end
      end
    end
    checks++;
    if (sat_events == 0) begin
      failures++;
      $display("overflow control never acted");
    end
    $display("clamp events %0d, resync checks %0d", sat_events, exact_after_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
