// cc_pkg: shared sizes, types and helpers of the cross-coupling removal and
// virtual-probe monitoring datapath.
//
// The system sizes follow the multi-cavity station it serves: eight cavities,
// each with a Forward and a Reflected RF signal, each signal as an I/Q pair,
// which gives a vector of 32 real samples and a 32 x 32 real correction
// matrix. Sample and coefficient widths, the fixed-point format and the order
// of the 32 samples in the vector are this design's own choices:
//   * samples are signed 16-bit integers (the width of the digitizer ADCs);
//   * coefficients are signed 32-bit with 30 fractional bits (range +-2),
//     fine enough for couplings near -120 dB relative to full scale;
//   * vector element 4k+0 is Forward I of cavity k, 4k+1 Forward Q,
//     4k+2 Reflected I and 4k+3 Reflected Q, so the couplings inside one
//     cavity form a 4 x 4 block on the diagonal of the matrix.
// Results are rounded half-up and saturated back to the sample width.
package cc_pkg;

  parameter int unsigned N_CAV     = 8;          // cavities per station
  parameter int unsigned VEC_LEN   = 4 * N_CAV;  // F/R x I/Q per cavity = 32
  parameter int unsigned DATA_W    = 16;         // sample width
  parameter int unsigned COEF_W    = 32;         // coefficient width
  parameter int unsigned COEF_FRAC = 30;         // fractional bits of a coefficient

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // One complex sample.
  typedef struct packed {
    sample_t i;
    sample_t q;
  } iq_t;

  // One complex coefficient.
  typedef struct packed {
    coef_t i;
    coef_t q;
  } ciq_t;

  // Fixed-point 1.0 in coefficient format.
  localparam coef_t COEF_ONE = coef_t'(64'sd1 <<< COEF_FRAC);

  localparam logic signed [63:0] SAMPLE_MAX = (64'sd1 <<< (DATA_W - 1)) - 64'sd1;
  localparam logic signed [63:0] SAMPLE_MIN = -(64'sd1 <<< (DATA_W - 1));

  // Round half-up at COEF_FRAC fractional bits and saturate to a sample.
  // The accumulator must carry no more than 62 significant bits.
  function automatic sample_t round_sat(input logic signed [63:0] acc);
    logic signed [63:0] r;
    r = (acc + (64'sd1 <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
    if (r > SAMPLE_MAX)      return sample_t'(SAMPLE_MAX);
    else if (r < SAMPLE_MIN) return sample_t'(SAMPLE_MIN);
    else                     return sample_t'(r[DATA_W-1:0]);
  endfunction

  // Vector index of each signal of cavity k.
  function automatic int unsigned idx_fi(input int unsigned k); return 4 * k + 0; endfunction
  function automatic int unsigned idx_fq(input int unsigned k); return 4 * k + 1; endfunction
  function automatic int unsigned idx_ri(input int unsigned k); return 4 * k + 2; endfunction
  function automatic int unsigned idx_rq(input int unsigned k); return 4 * k + 3; endfunction

endpackage
