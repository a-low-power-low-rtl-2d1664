// tap_delay_line: the delay line of one filter section.
//
// A chain of MAX_WIN delay elements T, each holding one W-bit sample. Every
// clock the input sample enters element 1 and all stored samples move one
// place on. The output `leave_o` is the sample that is pushed out of the
// window this clock: the content of element 8, 16 or 32 for FIR8, FIR16 or
// FIR32, i.e. the input sample from 8, 16 or 32 clocks earlier. The taps at
// 8/16/32 follow the published section diagram; in the published circuit the
// elements are dynamic transmission-gate/inverter latches on a two-phase
// clock, here they are ordinary flip-flops on the rising edge of `clk`.
//
// Timing: `leave_o` is combinational from the register contents and the
// select.
// Reset clears every element to zero (this design's choice).
module tap_delay_line
  import decim_pkg::*;
#(
  parameter int unsigned W     = 1,        // sample width in bits
  parameter int unsigned DEPTH = MAX_WIN   // number of delay elements
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  fir_order_e             order_i,   // FIR8 / FIR16 / FIR32
  input  logic [W-1:0]           din_i,     // sample entering the window
  output logic [W-1:0]           leave_o    // sample leaving the window
);

  logic [DEPTH-1:0][W-1:0] line_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) line_q <= '0;
    else        line_q <= {line_q[DEPTH-2:0], din_i};
  end

  // Tap selection: element k (1-based) holds the sample from k clocks ago.
  always_comb begin
    case (order_i)
      FIR8:    leave_o = line_q[7];
      FIR16:   leave_o = line_q[15];
      default: leave_o = line_q[DEPTH-1];
    endcase
  end

  initial begin
    assert (DEPTH >= 32) else $error("tap_delay_line: DEPTH must be at least 32");
  end

endmodule
