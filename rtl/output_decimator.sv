// output_decimator: down-samples the full-rate filter output by a factor M.
//
// Because every filter section works at the modulator rate, a filtered
// value exists for every input sample and the output may be decimated by
// any integer M, chosen at run time on `dec_factor_i`. A phase counter runs
// 0..M-1; in the clock where it reads M-1 the current input word is captured
// into `dout_o` and `valid_o` is high for the following clock. M = 0 is
// treated as M = 1 (every sample passed on).
//
// `win_start_o` serves the counter form of the last section: it is high in
// the clock whose phase lies L clocks before the capture clock (L = window
// length 8/16/32 from `order_i`), so that a section which starts
// accumulating there holds exactly the last L samples when they are
// captured. This needs M >= L; `m_ok_o` is low when M is smaller.
//
// Published: decimation by any factor M at the filter output. This design's
// choices: the counter, the capture register, the valid pulse and the
// window-start pulse.
module output_decimator
  import decim_pkg::*;
#(
  parameter int unsigned W   = SEC3_W,  // data width
  parameter int unsigned M_W = DEC_W    // width of the decimation factor
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [M_W-1:0] dec_factor_i,  // M
  input  fir_order_e     order_i,
  input  logic [W-1:0]   din_i,         // full-rate filter output
  output logic [W-1:0]   dout_o,        // decimated output
  output logic           valid_o,       // one-clock pulse per output word
  output logic           win_start_o,   // start of an L-sample window
  output logic           m_ok_o         // M >= window length
);

  logic [M_W-1:0] m_eff, last_phase, start_phase, cnt_q;
  logic [M_W-1:0] len;
  logic           capture;

  always_comb begin
    m_eff      = (dec_factor_i == '0) ? M_W'(1) : dec_factor_i;
    last_phase = m_eff - M_W'(1);
    len        = M_W'(win_len(order_i));
    m_ok_o     = m_eff >= len;
    // (M - 1 - L) mod M, for M >= L
    start_phase = (m_eff > len) ? (last_phase - len) : last_phase;
    capture     = cnt_q >= last_phase;
    win_start_o = m_ok_o && (cnt_q == start_phase);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q   <= '0;
      dout_o  <= '0;
      valid_o <= 1'b0;
    end else begin
      cnt_q   <= capture ? '0 : cnt_q + M_W'(1);
      valid_o <= capture;
      if (capture) dout_o <= din_i;
    end
  end

endmodule
