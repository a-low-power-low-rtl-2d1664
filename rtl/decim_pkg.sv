// decim_pkg: types and constants shared by the moving-sum decimation filter.
//
// The filter is a cascade of three equal sections, each a moving sum
// ("FIR filter with equal coefficients") of the last N+1 samples, all clocked
// at the modulator sampling rate. The order N of every section is chosen at
// run time by one of three select lines, FIR8, FIR16 and FIR32, which give
// N = 7, 15 and 31 (window lengths 8, 16 and 32). Those three options and the
// 5/10/15-bit section widths for N = 31 are the published design; the binary
// encoding of the select below is this design's own choice.
package decim_pkg;

  // Window selection: one of the three hardware select lines is active.
  typedef enum logic [1:0] {
    FIR8  = 2'd0,   // N = 7,  window of 8 samples
    FIR16 = 2'd1,   // N = 15, window of 16 samples
    FIR32 = 2'd2    // N = 31, window of 32 samples
  } fir_order_e;

  // Longest window any section supports (N + 1 for N = 31).
  localparam int unsigned MAX_WIN = 32;

  // Output widths of the three sections for N = 31 (1-bit input stream).
  localparam int unsigned SEC1_W = 5;
  localparam int unsigned SEC2_W = 10;
  localparam int unsigned SEC3_W = 15;

  // Width of the run-time decimation factor M.
  localparam int unsigned DEC_W = 16;

  // Window length N + 1 selected by an order code; an unused code
  // falls back to the longest window.
  function automatic int unsigned win_len(fir_order_e ord);
    case (ord)
      FIR8:    return 8;
      FIR16:   return 16;
      default: return 32;
    endcase
  endfunction

endpackage
