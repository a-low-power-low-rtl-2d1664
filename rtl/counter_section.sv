// counter_section: the simplified form of the last filter section, an
// accumulator without delay line and subtractor.
//
// When the output is decimated by M >= N+1, only one moving sum in every M
// is ever used. That sum can be built by clearing an accumulator N+1 samples
// before the output instant and adding the following N+1 samples, which is
// what this section does: on `start_i` it loads the current input, otherwise
// it adds the input to what it holds. Driven by the window-start pulse of
// `output_decimator`, its value at every capture instant equals the value a
// full moving-sum section would have there, bit for bit. Between captures
// its value is a partial sum and must not be used.
//
// Overflow control as in the full section: the sum is clamped to all ones.
// `sat_o` pulses when the clamp acts.
//
// Published: the idea of replacing the last section by a counter when M is
// large. This design's choices: the load-on-start scheme tied to the
// decimator phase, the clamp, the reset to zero.
module counter_section
  import decim_pkg::*;
#(
  parameter int unsigned IN_W  = SEC2_W,
  parameter int unsigned OUT_W = SEC3_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start_i,   // begin a new window with this sample
  input  logic [IN_W-1:0]  din_i,
  output logic [OUT_W-1:0] sum_o,
  output logic             sat_o
);

  localparam logic [OUT_W:0] MAXV = {1'b0, {OUT_W{1'b1}}};

  logic [OUT_W-1:0] acc_q;
  logic [OUT_W:0]   nxt;
  logic             ovf;

  always_comb begin
    nxt = (start_i ? '0 : {1'b0, acc_q}) + (OUT_W+1)'(din_i);
    ovf = nxt > MAXV;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0;
      sat_o <= 1'b0;
    end else begin
      acc_q <= ovf ? MAXV[OUT_W-1:0] : nxt[OUT_W-1:0];
      sat_o <= ovf;
    end
  end

  assign sum_o = acc_q;

  initial begin
    assert (IN_W <= OUT_W) else $error("counter_section: IN_W must not exceed OUT_W");
  end

endmodule
