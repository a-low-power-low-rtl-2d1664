// boxcar_section: one section of the decimation filter, a moving sum of the
// last N+1 input samples (an FIR filter of order N with all coefficients 1).
//
// How it works: the accumulator ("memory") always holds the sum of the
// samples in the delay line. Each clock the new sample is added and the
// sample that drops out of the window is subtracted, so a section needs one
// adder and one subtractor whatever its order. Both operations carry the
// overflow control of the published circuit: the sum after the adder is
// clamped to all ones if it does not fit in OUT_W bits, and the difference
// after the subtractor is clamped to zero if it goes negative. Only the first
// section (1-bit input, 5-bit output, 32-sample window) can reach the clamp,
// when 32 consecutive ones arrive; the zero clamp then brings the accumulator
// back to the exact window sum once the window has emptied. For the 5->10 and
// 10->15 bit sections the window sum always fits and the output is exact.
//
// Interface: one sample per clock on `din_i` (unsigned), result on `sum_o`
// one clock later (registered). `order_i` picks the window length 8/16/32
// (FIR8/FIR16/FIR32); it must only change while `rst_n` is low, because the
// accumulator would otherwise no longer match the window contents.
// `sat_o` pulses for a clock whenever either clamp acted.
//
// Published: the add/subtract structure, the delay line with FIR8/16/32
// taps, the overflow control after each operation, the 1->5 bit first
// section. This design's choices: flip-flops instead of dynamic latches,
// asynchronous active-low reset to an empty window, unsigned samples.
module boxcar_section
  import decim_pkg::*;
#(
  parameter int unsigned IN_W  = 1,       // input sample width
  parameter int unsigned OUT_W = SEC1_W   // accumulator / output width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  fir_order_e       order_i,
  input  logic [IN_W-1:0]  din_i,
  output logic [OUT_W-1:0] sum_o,
  output logic             sat_o
);

  localparam logic [OUT_W:0] MAXV = {1'b0, {OUT_W{1'b1}}};

  logic [IN_W-1:0]  leave;
  logic [OUT_W:0]   add_full;     // one extra bit to see the carry out
  logic [OUT_W-1:0] add_sat;      // after the adder's overflow control
  logic [OUT_W:0]   sub_full;     // one extra bit to see the borrow
  logic [OUT_W-1:0] sub_sat;      // after the subtractor's overflow control
  logic             add_ovf, sub_unf;
  logic [OUT_W-1:0] acc_q;

  tap_delay_line #(.W(IN_W)) u_line (
    .clk     (clk),
    .rst_n   (rst_n),
    .order_i (order_i),
    .din_i   (din_i),
    .leave_o (leave)
  );

  always_comb begin
    add_full = {1'b0, acc_q} + (OUT_W+1)'(din_i);
    add_ovf  = add_full > MAXV;
    add_sat  = add_ovf ? MAXV[OUT_W-1:0] : add_full[OUT_W-1:0];
    sub_full = {1'b0, add_sat} - (OUT_W+1)'(leave);
    sub_unf  = sub_full[OUT_W];
    sub_sat  = sub_unf ? '0 : sub_full[OUT_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0;
      sat_o <= 1'b0;
    end else begin
      acc_q <= sub_sat;
      sat_o <= add_ovf | sub_unf;
    end
  end

  assign sum_o = acc_q;

  initial begin
    assert (IN_W <= OUT_W) else $error("boxcar_section: IN_W must not exceed OUT_W");
  end

  // The window length is configuration, not data: it may only change in reset.
  a_order_static: assert property (@(posedge clk) disable iff (!rst_n) $stable(order_i))
    else $error("boxcar_section: order changed outside reset");

endmodule
