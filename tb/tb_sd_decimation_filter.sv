// tb_sd_decimation_filter: end-to-end test of the whole decimation filter
// at its default parameters, fed by a behavioural 2nd-order modulator.
//
// Two filters run side by side on the same bit stream: the default one
// (three moving-sum sections) and one whose last section is the
// accumulate-and-restart counter. The testbench keeps its own model of the
// three sections (plain window sums, with the first section's clamp rule)
// and of the down-sampler, and checks every full-rate output and every
// decimated word of the default filter against it; whenever M >= N+1 the
// counter variant must deliver the same decimated words.
//
// Scenarios: an impulse to measure the latency (3 clocks to the first
// response, 3*L - 2 clocks of response), DC inputs for FIR32 with M = 200
// and FIR8 with M = 100 whose decimated value must match the input level,
// a sine for FIR16 with M = 4 (the counter variant then reports M < N+1),
// and a run of ones that makes the first section's overflow control act.
// Each mechanism is counted; one that never happened is a failure.
module tb_sd_decimation_filter;
  import decim_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  fir_order_e order = FIR32;
  logic [15:0] m = 16'd200;
  logic signed [15:0] ain = '0;
  logic mod_bit, bit_drv = 1'b0;
  int   src = 0;          // 0: modulator, 1: forced value below
  logic forced = 1'b0;

  logic [4:0]  s1, s1c;
  logic [9:0]  s2, s2c;
  logic [14:0] full, fullc, dout, doutc;
  logic        valid, validc, m_ok, m_okc;
  logic [2:0]  sat, satc;

  int checks = 0, failures = 0, cycle = 0;
  int n_sat1 = 0, n_outputs = 0, n_counter_match = 0, n_m_low = 0, n_latency = 0;
  int n_dc = 0;
  bit used_order[3];

  always #5 clk = ~clk;

  sd_modulator_model u_mod (.clk, .rst_n, .ain_i(ain), .bit_o(mod_bit));

  sd_decimation_filter dut (
    .clk, .rst_n, .bit_i(bit_drv), .order_i(order), .dec_factor_i(m),
    .sec1_o(s1), .sec2_o(s2), .full_o(full), .dout_o(dout), .valid_o(valid),
    .sat_o(sat), .m_ok_o(m_ok));

  sd_decimation_filter #(.LAST_AS_COUNTER(1'b1)) dut_c (
    .clk, .rst_n, .bit_i(bit_drv), .order_i(order), .dec_factor_i(m),
    .sec1_o(s1c), .sec2_o(s2c), .full_o(fullc), .dout_o(doutc), .valid_o(validc),
    .sat_o(satc), .m_ok_o(m_okc));

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  int q1[$], q2[$], q3[$];
  int a1, a2, a3, mcnt, exp_dout;
  bit exp_valid;

  function automatic int leaving(ref int q[$], input int len);
    return (q.size() >= len) ? q[q.size() - len] : 0;
  endfunction

  task automatic model_reset();
    q1.delete(); q2.delete(); q3.delete();
    a1 = 0; a2 = 0; a3 = 0; mcnt = 0; exp_valid = 0; exp_dout = 0;
  endtask

  task automatic model_step(input int b);
    int len, in2, in3, mm;
    len = win_len(order);
    in2 = a1; in3 = a2;
    mm = (m == 0) ? 1 : int'(m);
    // down-sampler sees the last-section value before this edge
    exp_valid = (mcnt >= mm - 1);
    if (exp_valid) begin
      exp_dout = a3;
      mcnt = 0;
    end else mcnt++;
    a3 = a3 + in3 - leaving(q3, len);
    q3.push_back(in3);
    a2 = a2 + in2 - leaving(q2, len);
    q2.push_back(in2);
    a1 = a1 + b;
    if (a1 > 31) a1 = 31;
    a1 = a1 - leaving(q1, len);
    if (a1 < 0) a1 = 0;
    q1.push_back(b);
  endtask

  // ---------------- one clock ----------------
  task automatic tick();
    // at a falling edge: choose the bit for the next rising edge
    bit_drv = (src == 0) ? mod_bit : forced;
    @(posedge clk);
    model_step(int'(bit_drv));
    @(negedge clk);
    cycle++;
    checks += 5;
    if (int'(s1) != a1) begin failures++; $display("c%0d sec1 %0d exp %0d", cycle, s1, a1); end
    if (int'(s2) != a2) begin failures++; $display("c%0d sec2 %0d exp %0d", cycle, s2, a2); end
    if (int'(full) != a3) begin failures++; $display("c%0d sec3 %0d exp %0d", cycle, full, a3); end
    if (valid != exp_valid) begin failures++; $display("c%0d valid %0b exp %0b", cycle, valid, exp_valid); end
    if (s1c != s1 || s2c != s2 || validc != valid) begin
      failures++; $display("c%0d counter variant front end differs", cycle);
    end
    if (valid) begin
      n_outputs++;
      checks++;
      if (int'(dout) != exp_dout) begin failures++; $display("c%0d dout %0d exp %0d", cycle, dout, exp_dout); end
      if (m_okc) begin
        checks++;
        if (doutc != dout) begin
          failures++; $display("c%0d counter variant %0d, full %0d", cycle, doutc, dout);
        end else n_counter_match++;
      end
    end
    if (!m_okc) n_m_low++;
    if (sat[0]) n_sat1++;
  endtask

  task automatic restart(input fir_order_e ord, input int mval);
    rst_n = 1'b0;
    order = ord;
    m = 16'(mval);
    used_order[int'(ord)] = 1'b1;
    model_reset();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
  endtask

  // DC check: decimated output against the modulator's ones density
  task automatic dc_run(input fir_order_e ord, input int mval, input int level, input int nout);
    int len, full_scale, expected, got, tol, seen;
    restart(ord, mval);
    src = 0;
    ain = 16'(level);
    len = win_len(ord);
    full_scale = len * len * len;
    expected = int'((real'(32768 + level) / 65536.0) * real'(full_scale));
    tol = full_scale / 50 + 1;
    seen = 0;
    while (seen < nout) begin
      tick();
      if (valid) begin
        seen++;
        if (seen > 3) begin
          got = int'(dout);
          checks++;
          n_dc++;
          if (got < expected - tol || got > expected + tol) begin
            failures++;
            $display("DC %s M=%0d level %0d: out %0d expected %0d", ord.name(), mval, level, got, expected);
          end
        end
      end
    end
  endtask

  initial begin
    int t0, first, last_nz;
    model_reset();

    // 1. impulse response and latency, FIR32
    restart(FIR32, 200);
    src = 1; forced = 1'b0;
    repeat (10) tick();
    forced = 1'b1; tick(); t0 = cycle; forced = 1'b0;
    first = -1; last_nz = -1;
    repeat (150) begin
      // the first response is seen three rising edges after the impulse's edge
      tick();
      if (full != 0 && first < 0) first = cycle;
      if (full != 0) last_nz = cycle;
    end
    checks += 2;
    if (first - t0 != 2) begin failures++; $display("latency %0d", first - t0 + 1); end
    else n_latency++;
    if (last_nz - first + 1 != 3 * 32 - 2) begin
      failures++; $display("impulse response length %0d", last_nz - first + 1);
    end

    // 2. DC input, N = 31, M = 200 (15-bit output)
    dc_run(FIR32, 200, 16384, 12);
    dc_run(FIR32, 200, -9830, 8);

    // 3. N = 7, M = 100 (9-bit resolution)
    dc_run(FIR8, 100, -16384, 12);

    // 4. N = 15, M = 4, sine input (counter variant must report M < N+1)
    restart(FIR16, 4);
    src = 0;
    for (int k = 0; k < 3000; k++) begin
      ain = 16'($rtoi(0.7 * 32767.0 * $sin(2.0 * 3.14159265 * real'(k) / 1000.0)));
      tick();
    end

    // 5. run of ones: first-section overflow control, then recovery
    restart(FIR32, 32);
    src = 1; forced = 1'b1;
    repeat (100) tick();
    forced = 1'b0;
    repeat (100) tick();
    checks++;
    if (full != 0) begin failures++; $display("no recovery after ones run"); end

    // mechanisms
    checks += 8;
    if (n_sat1 == 0)          begin failures++; $display("overflow control never acted"); end
    if (n_outputs == 0)       begin failures++; $display("no decimated outputs"); end
    if (n_counter_match == 0) begin failures++; $display("counter variant never compared"); end
    if (n_m_low == 0)         begin failures++; $display("M < N+1 never seen"); end
    if (n_latency == 0)       begin failures++; $display("latency never confirmed"); end
    if (n_dc == 0)            begin failures++; $display("no DC checks"); end
    if (!used_order[0] || !used_order[1] || !used_order[2]) begin
      failures++; $display("not every order was used");
    end
    if (cycle < 1000)         begin failures++; $display("too few cycles"); end
    $display("cycles %0d outputs %0d clamp %0d counter-match %0d m-low %0d dc %0d",
             cycle, n_outputs, n_sat1, n_counter_match, n_m_low, n_dc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
