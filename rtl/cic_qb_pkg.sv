// cic_qb_pkg - shared constants of the multi-rate first-stage decimator.
//
// The decimator turns one stream of 3-bit samples, taken at 4 GS/s and
// delivered as 32 parallel lanes at 125 MHz, into one 8-bit sample per
// clock (total decimation 32). It is a non-recursive CIC filter (D = 8,
// N = 2, three blocks of (1 + z^-1)^2 each followed by decimation by 2)
// and a 17-tap symmetric quarter-band FIR that decimates by 4.
//
// Lane, width and order numbers below follow the published design. The
// quarter-band coefficients are this design's own: an equiripple (Remez)
// low-pass of order 16, passband edge 0.0625 and stopband edge 0.1875 of
// its 500 MS/s input rate (31.25 MHz and 93.75 MHz), stopband weight 30,
// scaled so that the taps sum to 2^QB_FRAC (unit DC gain) and rounded to
// integers. Together with the CIC it attenuates every band that aliases
// onto 0..31.25 MHz at the 125 MS/s output by at least 47 dB.
package cic_qb_pkg;

  // Input: 32 lanes of 3-bit two's complement samples per 125 MHz clock.
  localparam int unsigned DEC_LANES = 32;
  localparam int unsigned DEC_IN_W  = 3;

  // Non-recursive CIC: D = 2^CIC_M = 8, order N = 2.
  localparam int unsigned DEC_CIC_M = 3;
  localparam int unsigned DEC_CIC_N = 2;

  // Quarter-band FIR: 17 taps (order 16), integer taps summing to 2^10.
  localparam int unsigned QB_TAPS = 17;
  localparam int unsigned QB_CW   = 10;
  localparam int unsigned QB_FRAC = 10;
  localparam int QB_COEF [QB_TAPS] = '{
    -5, -12, -15, -6, 26, 79, 143, 195, 214, 195, 143, 79, 26, -6, -15, -12, -5
  };

  // Output of the stage: one 8-bit sample per clock.
  localparam int unsigned DEC_OUT_W = 8;

  // Binomial coefficient C(n, k): the taps of (1 + z^-1)^n.
  function automatic int binom(input int n, input int k);
    int r;
    r = 1;
    for (int i = 0; i < k; i++) r = r * (n - i) / (i + 1);
    return r;
  endfunction

endpackage
