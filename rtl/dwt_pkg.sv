// dwt_pkg: types and constants shared by the ROI lifting-DWT design.
//
// The 9/7 (CDF) lifting coefficients are held as an 8-bit unsigned mantissa,
// a right shift and a sign, so that every coefficient multiplication can run
// on 8x8 multiplier cores: value = (neg ? -1 : 1) * mag / 2**shift.
// The coefficient values are the standard Daubechies/Sweldens 9/7 lifting
// factors (alpha, beta, gamma, delta, K); the 8-bit quantisation and the
// choice of K for the low band and 1/K for the high band are this design's.
package dwt_pkg;

  // Which 8x8 multiplier core a coefficient multiplier is built from.
  typedef enum logic {
    MULT_VEDIC   = 1'b0,
    MULT_WALLACE = 1'b1
  } mult_kind_e;

  // Pipeline depth of each 8x8 core: the Vedic multiplier is combinational,
  // the Wallace-tree multiplier has one register between compressors and
  // final adder.
  function automatic int mult_latency(mult_kind_e k);
    return (k == MULT_WALLACE) ? 1 : 0;
  endfunction

  // Samples (enables) from an even/odd pair at the input of dwt_1d to its
  // low/high outputs: four lifting steps of LAT+1 plus the scaling stage of
  // LAT+1, plus the alignment of the second step (one sample).
  function automatic int dwt_latency(mult_kind_e k);
    return 5 * mult_latency(k) + 7;
  endfunction

  // Samples from a low/high pair at the input of idwt_1d to the rebuilt
  // even/odd pixel pair: input scaling, four lifting steps, alignment of the
  // third and fourth steps, and the output rounding register.
  function automatic int idwt_latency(mult_kind_e k);
    return 5 * mult_latency(k) + 8;
  endfunction

  // alpha = -1.586134342 ~ -203/2**7
  localparam logic [7:0] ALPHA_MAG = 8'd203;
  localparam int         ALPHA_SH  = 7;
  localparam bit         ALPHA_NEG = 1'b1;
  // beta  = -0.052980118 ~ -217/2**12
  localparam logic [7:0] BETA_MAG  = 8'd217;
  localparam int         BETA_SH   = 12;
  localparam bit         BETA_NEG  = 1'b1;
  // gamma =  0.882911076 ~ 226/2**8
  localparam logic [7:0] GAMMA_MAG = 8'd226;
  localparam int         GAMMA_SH  = 8;
  localparam bit         GAMMA_NEG = 1'b0;
  // delta =  0.443506852 ~ 227/2**9
  localparam logic [7:0] DELTA_MAG = 8'd227;
  localparam int         DELTA_SH  = 9;
  localparam bit         DELTA_NEG = 1'b0;
  // scaling K = 1.149604398 ~ 147/2**7 (low band)
  localparam logic [7:0] KSC_MAG   = 8'd147;
  localparam int         KSC_SH    = 7;
  // inverse scaling 1/K = 0.869864452 ~ 223/2**8 (high band)
  localparam logic [7:0] KINV_MAG  = 8'd223;
  localparam int         KINV_SH   = 8;

  // Number of Booth radix-4 digits for an unsigned 8-bit multiplier.
  localparam int BOOTH_DIGITS = 5;

  // One radix-4 Booth digit: magnitude 1 or 2 of the multiplicand, and sign.
  typedef struct packed {
    logic one;
    logic two;
    logic neg;
  } booth_digit_t;

endpackage
