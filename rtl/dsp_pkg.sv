// dsp_pkg: shared widths, types and the unit map of the second-order 2-D DLSI processor.
//
// The processor evaluates a second-order (L = 2) 2-D DLSI system with quarter-plane support,
//   g(m,n) = sum a(j,k) f(m-j,n-k) - sum_{j+k>0} b(j,k) g(m-j,n-k),
// in state-space form. Nine arithmetic units each solve one instance of the computational
// primitive q = [c*f + r] + [d*y + q'] per sample: unit 0 forms the output g, units 1..8 form
// the six horizontal state variables (one-sample delays, kept in registers) and the two
// vertical state variables (one-row delays, kept in the external QBUF). Data words are 16-bit
// two's-complement integers (from the document); coefficients are 16-bit two's complement with
// COEF_FRAC fractional bits (this design's choice).
package dsp_pkg;

  localparam int unsigned DW        = 16;  // data / state / coefficient word
  localparam int unsigned PW        = 32;  // multiplier product
  localparam int unsigned COEF_FRAC = 14;  // fractional bits of a coefficient
  localparam int unsigned LW        = COEF_FRAC;           // LSB part of a product
  localparam int unsigned IW        = PW - COEF_FRAC + 2;  // accumulator: whole part + guard
  localparam int unsigned NUNITS    = 9;   // arithmetic units per processor

  typedef logic signed [DW-1:0] word_t;

  // Vertical state pair stored in QBUF for one column: v[0] = v1 (row-1 chain), v[1] = v2.
  typedef struct packed {
    word_t v2;
    word_t v1;
  } qword_t;

  // The four non-overlapping phases of one processor cycle.
  typedef enum logic [1:0] {
    PH0 = 2'd0,  // multiply c*f, preload accumulator with r + q'
    PH1 = 2'd1,  // accumulate c*f; unit 0 latches the output g (feedback term y)
    PH2 = 2'd2,  // multiply d*y
    PH3 = 2'd3   // accumulate d*y, round/saturate, latch all state variables
  } phase_e;

  // Coefficient write from the system controller: unit index, C and D values.
  typedef struct packed {
    logic [3:0] unit;
    word_t      c;
    word_t      d;
  } coef_wr_t;

endpackage
