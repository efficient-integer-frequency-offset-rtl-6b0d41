// ifo_pkg: constants and types shared by the integer-frequency-offset (IFO)
// estimator and compensator.
//
// The pilot geometry is that of the IEEE 802.16-2009 (256-point FFT) long
// preamble: pilots sit on the even sub-carriers 2..100 and 156..254. The
// estimator only uses the pilots whose index is a multiple of four, 4..100 in
// the first half and 156..252 in the second, 25 per half, so a used pilot
// arrives at most once every four samples. The trial offsets are the eight
// values eps' = 0,4,..,28: the input stream is assumed to be pre-offset by 12
// sub-carriers upstream, so the true IFO is eps' - 12 (range -12..+16).
//
// coef_t is a normalised known-pilot correlation U whose real and imaginary
// parts are each -1, 0 or +1 (two-bit signed fields).
package ifo_pkg;

  localparam int unsigned N_FFT      = 256;  // FFT size (802.16-2009 OFDM PHY)
  localparam int unsigned N_TRIAL    = 8;    // number of candidate IFO values
  localparam int unsigned PIL_STEP   = 4;    // spacing of the used pilots
  localparam int unsigned SIDE1_FIRST = 4;   // first used pilot, lower half
  localparam int unsigned SIDE1_LAST  = 100; // last used pilot, lower half
  localparam int unsigned SIDE2_FIRST = 156; // first used pilot, upper half
  localparam int unsigned SIDE2_LAST  = 252; // last used pilot, upper half
  localparam int unsigned PIL_PER_SIDE = (SIDE1_LAST - SIDE1_FIRST) / PIL_STEP + 1; // 25
  localparam int unsigned PIL_DEPTH  = 32;   // entries per PilReg half
  localparam int unsigned PIL_WIN    = N_TRIAL; // window width seen by the MACs
  localparam int          PRE_OFFSET = 12;   // upstream pre-offset in sub-carriers
  localparam int unsigned MAX_SHIFT  = PIL_STEP * (N_TRIAL - 1); // 28

  typedef struct packed {
    logic signed [1:0] re;
    logic signed [1:0] im;
  } coef_t;

  // True when sub-carrier k is one of the 50 pilots used for estimation.
  function automatic logic is_used_pilot(input logic [7:0] k);
    return (k[1:0] == 2'b00) &&
           (((k >= 8'(SIDE1_FIRST)) && (k <= 8'(SIDE1_LAST))) ||
            ((k >= 8'(SIDE2_FIRST)) && (k <= 8'(SIDE2_LAST))));
  endfunction

endpackage
