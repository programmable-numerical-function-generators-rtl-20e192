// nfg_pkg: default sizes shared by the numerical function generator (NFG).
//
// The generator evaluates y = c1_i * (x - s_i) + (f(s_i) + v_i), a piecewise
// linear approximation over non-uniform segments.  These constants are the
// defaults of the 16-bit-precision, 15-bit-accuracy generator: a two's
// complement input with 1 integer and 15 fraction bits, as in the
// 16-bit evaluation of the architecture.  Word widths that follow from an
// error analysis the architecture leaves to its generator (coefficient,
// guard and output widths) are this implementation's own choice, sized so
// that one build holds every function of the 16-bit evaluation set.
package nfg_pkg;

  // Input x: two's complement, X_W bits of which X_FRAC are fraction bits.
  localparam int unsigned DEF_X_W      = 16;
  localparam int unsigned DEF_X_FRAC   = 15;

  // Segment index width: up to 2**DEF_SEG_W segments (1/x needs 702).
  localparam int unsigned DEF_SEG_W    = 10;

  // LUT cascade: number of LUTs and input bits of the first (LSB) LUT.
  // The remaining input bits are split evenly over the other LUTs.
  localparam int unsigned DEF_N_CAS    = 4;
  localparam int unsigned DEF_FIRST_W  = 4;

  // Scaled slope magnitude |c1|*2^-l: unsigned, C1_W bits, C1_FRAC fraction.
  localparam int unsigned DEF_C1_W     = 16;
  localparam int unsigned DEF_C1_FRAC  = 15;

  // Shift amount l_i of the scaling method.
  localparam int unsigned DEF_L_W      = 4;

  // Output y: two's complement, Y_W bits, Y_FRAC fraction bits.
  localparam int unsigned DEF_Y_W      = 20;
  localparam int unsigned DEF_Y_FRAC   = 15;

  // Extra fraction bits carried in the product and in f(s_i)+v_i.
  localparam int unsigned DEF_GUARD    = 4;

  // Pipeline depth of the whole generator (Table-1 style accounting):
  // n_cas LUT stages, coefficient table, offset adder, multiplier,
  // optional shifter, optional two's complementer, output adder.
  function automatic int unsigned nfg_latency(int unsigned n_cas,
                                              bit use_shift, bit use_sign);
    return n_cas + 4 + int'(use_shift) + int'(use_sign);
  endfunction

endpackage
