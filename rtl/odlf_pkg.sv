// odlf_pkg: constants shared by the oversampled digital leapfrog filter (ODLF) RTL.
//
// The filter works on one-bit pulse-rate signals: a signal of amplitude a in [0,1] is a bit
// stream in which a fraction a of the clock samples is 1. Operators are up-down counters (UDC,
// integrators) and rate multipliers (RM, dithered one-bit quantizer times a coefficient rate).
//
// The defaults describe the fifth order elliptic benchmark filter (CCITT G.712 PCM low-pass):
// a third order branch a and a second order branch b, 10-bit rate multipliers, and counters
// lengthened by the power-of-two part of each coefficient (extra LSBs a1..a3 = 0,2,0 and
// b1..b2 = 1,0). The fabricated test chip used 11-bit operators without extra LSBs; that is
// selected with NBITS = 11 and all extra LSBs 0.
package odlf_pkg;

  // Rate-multiplier width, equal to the counter width seen by the RM (bits after the binary point).
  localparam int unsigned NBITS_DEFAULT = 10;

  // Orders of the two lattice branches of the benchmark filter.
  localparam int unsigned ORDER_A = 3;
  localparam int unsigned ORDER_B = 2;

  // Largest branch order supported by the extra-LSB parameter arrays.
  localparam int unsigned MAX_ORDER = 8;

  typedef int unsigned lsb_array_t [MAX_ORDER];

  // Extra counter LSBs per stage: the power-of-two part of each coefficient
  // (a: 9/16 = 1*9/16, 1/4 = 1/4*1, 1 = 1*1; b: 1/2 = 1/2*1, 9/16 = 1*9/16).
  localparam lsb_array_t EXTRA_A_DEFAULT = '{0, 2, 0, 0, 0, 0, 0, 0};
  localparam lsb_array_t EXTRA_B_DEFAULT = '{1, 0, 0, 0, 0, 0, 0, 0};
  localparam lsb_array_t EXTRA_NONE      = '{default: 0};

  // Coefficient rates in units of 2^-NBITS of the reference rate, for the coefficient
  // generator: the scaled benchmark RM rates a1..b2 = 9/16, 1, 1, 1, 9/16. A value of 2^NBITS
  // means the reference rate itself.
  typedef int unsigned rate_array_t [MAX_ORDER];
  localparam rate_array_t COEF_RATES_DEFAULT = '{576, 1024, 1024, 1024, 576, 0, 0, 0};

  // Reference rate for a 40 MHz system clock: 998/1024 of the clock, about 39 MHz, which is
  // the rate that stands for a coefficient of 1 in the benchmark.
  localparam int unsigned REF_RATE_DEFAULT = 998;

  // How the last integrator of a leapfrog chain is closed.
  typedef enum logic [0:0] {
    LOAD_BIAS = 1'b0,  // lattice branch: negative input is the constant bias rate RI0
    LOAD_SELF = 1'b1   // doubly terminated ladder: negative input is its own state (load R_L)
  } load_e;

endpackage
