// tb_counter_section: self-checking test of the accumulate-and-restart
// last section. Random 10-bit words are fed every clock and a start pulse is
// given every M clocks; L clocks after each start the output must equal the
// sum of the last L inputs from the testbench's own history (the value a
// full moving-sum section would show there). A final phase feeds full-scale
// words without restarting until the 15-bit clamp must act and hold.
module tb_counter_section;
  import decim_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start;
  logic [9:0] din;
  logic [14:0] sum;
  logic sat;
  int checks = 0, failures = 0, sat_seen = 0;
  int hist[$];

  always #5 clk = ~clk;

  counter_section dut (.clk, .rst_n, .start_i(start), .din_i(din), .sum_o(sum), .sat_o(sat));

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(input int mval, input int len);
    int since;
    rst_n = 1'b0; start = 1'b0; din = '0;
    hist.delete();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    since = -1;
    for (int cyc = 0; cyc < 8 * mval; cyc++) begin
      start = (cyc % mval == 0);
      din = 10'($urandom);
      @(posedge clk);
      hist.push_back(int'(din));
      if (start) since = 0;
      if (since >= 0) since++;
      @(negedge clk);
      if (since == len) begin
        int s;
        s = 0;
        for (int k = 0; k < len; k++) s += hist[hist.size()-1-k];
        checks++;
        if (int'(sum) != s) begin
          failures++;
          $display("M=%0d L=%0d sum=%0d expected %0d", mval, len, sum, s);
        end
      end
    end
  endtask

  initial begin
    start = 1'b0;
    run_case(8, 8);
    run_case(20, 16);
    run_case(32, 32);
    run_case(100, 32);
    // overflow: 40 full-scale words after one start exceed 2^15 - 1
    start = 1'b1; din = 10'h3ff;
    @(negedge clk);
    start = 1'b0;
    for (int k = 1; k < 40; k++) begin
      @(negedge clk);
      if (sat) sat_seen++;
    end
    checks += 2;
    if (sum != 15'h7fff) begin
      failures++;
      $display("clamp: sum=%0d", sum);
    end
    if (sat_seen == 0) begin
      failures++;
      $display("clamp never reported");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
