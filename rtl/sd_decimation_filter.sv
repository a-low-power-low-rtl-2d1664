// sd_decimation_filter: decimation filter for a 1-bit sigma-delta modulator.
//
// Instead of decimating after every stage, all three filter sections run at
// the modulator sampling rate and none of them needs a multiplier: each is a
// moving sum of the last N+1 samples (boxcar_section). Three moving sums in
// series give a sinc^3-like response whose stopband is good enough because
// the modulator's noise shaping leaves little noise just above the band.
// Since a filtered word exists for every input sample, the output is then
// decimated by any factor M chosen at run time (output_decimator).
//
// Word growth for N = 31: 1 bit -> 5 -> 10 -> 15 bits. The first section
// clamps its 0..32 window sum to 31 (overflow control); the later sections
// cannot overflow. With N = 15 or 7 the same hardware uses 12 or 9 of the
// output bits. The orders are selected by `order_i` (FIR8/FIR16/FIR32) for
// all three sections together and may only change while `rst_n` is low.
//
// LAST_AS_COUNTER = 1 replaces the third section by counter_section, an
// accumulator that is cleared L samples before each output instant; the
// decimated output is then the same as with the full section provided
// M >= N+1 (`m_ok_o`). The default, 0, is the full three-section filter.
//
// Timing: every section adds one register, so the first input sample
// reaches `full_o` three clocks after it is presented; `dout_o` is updated,
// with `valid_o` high for one clock, once every M clocks.
//
// Published: three equal sections, the adder/subtractor/accumulator section
// structure, FIR8/16/32 orders, 5/10/15-bit widths, decimation by any M, the
// counter simplification of the last section. This design's choices: reset,
// the run-time encoding of the order and M, the valid pulse.
module sd_decimation_filter
  import decim_pkg::*;
#(
  parameter int unsigned W1              = SEC1_W,  // section 1 output width
  parameter int unsigned W2              = SEC2_W,  // section 2 output width
  parameter int unsigned W3              = SEC3_W,  // section 3 output width
  parameter int unsigned M_W             = DEC_W,   // width of M
  parameter bit          LAST_AS_COUNTER = 1'b0     // simplified last section
) (
  input  logic           clk,           // modulator sampling clock f_S
  input  logic           rst_n,         // asynchronous, active low
  input  logic           bit_i,         // 1-bit modulator output
  input  fir_order_e     order_i,       // FIR8 / FIR16 / FIR32
  input  logic [M_W-1:0] dec_factor_i,  // output decimation factor M
  output logic [W1-1:0]  sec1_o,        // section 1 output, full rate
  output logic [W2-1:0]  sec2_o,        // section 2 output, full rate
  output logic [W3-1:0]  full_o,        // section 3 output, full rate
  output logic [W3-1:0]  dout_o,        // decimated output
  output logic           valid_o,       // dout_o updated (one clock)
  output logic [2:0]     sat_o,         // overflow control acted, per section
  output logic           m_ok_o         // M >= N+1
);

  logic win_start;

  boxcar_section #(.IN_W(1), .OUT_W(W1)) u_sec1 (
    .clk, .rst_n, .order_i,
    .din_i (bit_i),
    .sum_o (sec1_o),
    .sat_o (sat_o[0])
  );

  boxcar_section #(.IN_W(W1), .OUT_W(W2)) u_sec2 (
    .clk, .rst_n, .order_i,
    .din_i (sec1_o),
    .sum_o (sec2_o),
    .sat_o (sat_o[1])
  );

  if (LAST_AS_COUNTER) begin : g_last_counter
    counter_section #(.IN_W(W2), .OUT_W(W3)) u_sec3 (
      .clk, .rst_n,
      .start_i (win_start),
      .din_i   (sec2_o),
      .sum_o   (full_o),
      .sat_o   (sat_o[2])
    );
  end else begin : g_last_full
    boxcar_section #(.IN_W(W2), .OUT_W(W3)) u_sec3 (
      .clk, .rst_n, .order_i,
      .din_i (sec2_o),
      .sum_o (full_o),
      .sat_o (sat_o[2])
    );
  end

  output_decimator #(.W(W3), .M_W(M_W)) u_dec (
    .clk, .rst_n,
    .dec_factor_i,
    .order_i,
    .din_i       (full_o),
    .dout_o,
    .valid_o,
    .win_start_o (win_start),
    .m_ok_o
  );

endmodule
