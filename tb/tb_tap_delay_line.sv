// tb_tap_delay_line: self-checking test of the tapped delay line.
// Random 5-bit samples are pushed for each of the three window settings; the
// testbench keeps its own history of every sample and checks that the
// leaving sample is the one presented exactly 8, 16 or 32 clocks earlier
// (zero while the line is still filling after reset).
module tb_tap_delay_line;
  import decim_pkg::*;

  localparam int W = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  fir_order_e order;
  logic [W-1:0] din, leave;
  int checks = 0, failures = 0;
  logic [W-1:0] hist[$];

  always #5 clk = ~clk;

  tap_delay_line #(.W(W)) dut (.clk, .rst_n, .order_i(order), .din_i(din), .leave_o(leave));

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fir_order_e ords[3] = '{FIR8, FIR16, FIR32};
    din = '0;
    foreach (ords[o]) begin
      int len;
      order = ords[o];
      len = win_len(order);
      rst_n = 1'b0;
      hist.delete();
      repeat (3) @(negedge clk);
      rst_n = 1'b1;
      for (int t = 0; t < 200; t++) begin
        begin
          logic [W-1:0] exp_v;
          int p;
          p = hist.size();
          exp_v = (p >= len) ? hist[p-len] : '0;
          checks++;
          if (leave !== exp_v) begin
            failures++;
            $display("order %s t=%0d leave=%0d expected %0d", order.name(), t, leave, exp_v);
          end
        end
        din = W'($urandom);
        @(posedge clk);
        hist.push_back(din);
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
