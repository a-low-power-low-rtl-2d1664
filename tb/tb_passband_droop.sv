// tb_passband_droop: measures the passband droop of the default filter
// (N = 31, FIR32) at the band edge f = f_S / OSR for OSR = 100, 200, 400 and
// 800, the cases the filter was dimensioned for.
//
// The behavioural modulator is driven with a sine at f; the amplitude at f
// is measured by correlating with sine and cosine over whole periods, both
// in the bit stream and in the full-rate filter output. Their ratio, divided
// by the DC gain 32^3, is the filter's gain at f, independent of the
// modulator's own signal transfer. It must agree within 0.25 dB with the
// sinc^3 value |sin(pi*L*f)/(L*sin(pi*f))|^3 (L = 32), and within 0.35 dB
// with the design targets of about 4.5, 1.2, 0.4 and 0.1 dB of droop.
// Two stopband points are measured the same way: the first sidelobe, which
// must lie within 1 dB of the sinc^3 value (about -40 dB), and the first
// notch at f_S / 32, which must lie below -60 dB. The phase lag at each
// passband point must equal the linear-phase delay of 49.5 samples
// (3 x 15.5 plus three register stages), about 250 ns at f_S = 200 MHz.
module tb_passband_droop;
  import decim_pkg::*;

  localparam int  L  = 32;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [15:0] ain = '0;
  logic mod_bit;
  logic [4:0]  s1;
  logic [9:0]  s2;
  logic [14:0] full, dout;
  logic        valid, m_ok;
  logic [2:0]  sat;
  logic [15:0] m = 16'd200;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sd_modulator_model u_mod (.clk, .rst_n, .ain_i(ain), .bit_o(mod_bit));

  sd_decimation_filter dut (
    .clk, .rst_n, .bit_i(mod_bit), .order_i(FIR32), .dec_factor_i(m),
    .sec1_o(s1), .sec2_o(s2), .full_o(full), .dout_o(dout), .valid_o(valid),
    .sat_o(sat), .m_ok_o(m_ok));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Gain of the filter at f = f_S / period, measured against the bit stream.
  task automatic gain_at(input real period, input int nsamp, output real gain_db,
                         output real delay);
    real w, bi, bq, yi, yq, ph;
    int n;
    w = 2.0 * PI / period;
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    bi = 0; bq = 0; yi = 0; yq = 0;
    // settle: modulator start-up and the 94-sample filter response
    for (n = 0; n < 4 * int'(period) + 200; n++) begin
      ain = 16'($rtoi(0.5 * 32767.0 * $sin(w * real'(n))));
      @(negedge clk);
    end
    for (int k = 0; k < nsamp; k++) begin
      ph = w * real'(k);
      ain = 16'($rtoi(0.5 * 32767.0 * $sin(w * real'(n + k))));
      @(negedge clk);
      bi += real'(mod_bit) * $cos(ph);
      bq += real'(mod_bit) * $sin(ph);
      yi += real'(full) * $cos(ph);
      yq += real'(full) * $sin(ph);
    end
    gain_db = 20.0 * $log10($sqrt(yi * yi + yq * yq) / ($sqrt(bi * bi + bq * bq) * real'(L * L * L)));
    // phase lag of the output behind the bit stream, in samples
    delay = ($atan2(yq, yi) - $atan2(bq, bi)) / w;
    while (delay < 0.0) delay += period;
    while (delay >= period) delay -= period;
  endtask

  function automatic real sinc3_db(input real period);
    real r;
    r = $sin(PI * real'(L) / period) / (real'(L) * $sin(PI / period));
    if (r < 0.0) r = -r;
    return 60.0 * $log10(r);
  endfunction

  task automatic measure(input int osr, input real target_db);
    real gain_db, model_db, delay;
    m = 16'(osr);
    gain_at(real'(osr), (osr >= 400) ? 12 * osr : 4800, gain_db, delay);
    model_db = sinc3_db(real'(osr));
    $display("OSR %0d: measured %6.3f dB, sinc^3 %6.3f dB, design target -%0.1f dB",
             osr, gain_db, model_db, target_db);
    checks += 2;
    if (gain_db - model_db > 0.25 || model_db - gain_db > 0.25) begin
      failures++;
      $display("  differs from the sinc^3 response");
    end
    if (gain_db + target_db > 0.35 || -target_db - gain_db > 0.35) begin
      failures++;
      $display("  differs from the design target");
    end
    // linear phase: 3 x 15.5 samples of filter delay plus 3 register stages
    $display("  delay %5.2f samples (%0.0f ns at 200 MHz)", delay, delay * 5.0);
    checks++;
    if (delay < 49.0 || delay > 50.0) begin
      failures++;
      $display("  group delay differs from 49.5 samples");
    end
    checks++;
    if (sat != 0) begin
      failures++;
      $display("  unexpected clamp");
    end
  endtask

  initial begin
    measure(100, 4.5);   // case A
    measure(200, 1.2);   // case B, main configuration
    measure(400, 0.4);   // case C
    measure(800, 0.1);
    // stopband: first sidelobe of sinc^3 (about -40 dB, f = 1.43 f_S / 32)
    // and the first notch (f = f_S / 32)
    begin
      real g, per, dly;
      per = 32.0 / 1.4303;
      gain_at(per, 40000, g, dly);
      $display("first sidelobe: measured %6.2f dB, sinc^3 %6.2f dB", g, sinc3_db(per));
      checks++;
      if (g - sinc3_db(per) > 1.0 || sinc3_db(per) - g > 1.0) begin
        failures++;
        $display("  sidelobe level differs");
      end
      gain_at(32.0, 40000, g, dly);
      $display("first notch: measured %6.2f dB", g);
      checks++;
      if (g > -60.0) begin
        failures++;
        $display("  notch not deep enough");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
