// sd_modulator_model: behavioural model of a 2nd-order sigma-delta
// modulator, for simulation only (not synthesizable intent, no circuit
// meaning). It stands in for the analog modulator that feeds the
// decimation filter.
//
// Two discrete-time integrators with feedback of the 1-bit output into both
// (loop gains 1/2 each), integer arithmetic with full scale FS = 2^15:
//   i1 += (u - v) / 2,  i2 += (i1 - v) / 2,  y = (i2 >= 0),  v = y ? FS : -FS.
// `ain_i` is the input as a signed fraction of full scale (+-32767 ~ +-1);
// the density of ones in `bit_o` is (1 + u/FS) / 2 on average. A new bit
// appears after every rising clock edge.
module sd_modulator_model (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [15:0] ain_i,
  output logic               bit_o
);

  localparam longint FS = 32768;

  longint i1, i2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i1    <= 0;
      i2    <= 0;
      bit_o <= 1'b0;
    end else begin
      longint v, n1, n2;
      v  = bit_o ? FS : -FS;
      n1 = i1 + (longint'(ain_i) - v) / 2;
      n2 = i2 + (n1 - v) / 2;
      i1    <= n1;
      i2    <= n2;
      bit_o <= (n2 >= 0);
    end
  end

endmodule
