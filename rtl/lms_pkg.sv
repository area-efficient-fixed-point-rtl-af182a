// lms_pkg: shared constants and helpers for the fixed-point delayed-LMS (DLMS)
// adaptive filter.
//
// The filter works on two's-complement fixed-point words. Input samples x and
// the desired response d are L-bit fractions (one sign bit, L-1 fraction bits).
// Weights are WW-bit words with WF fraction bits. The defaults (16 taps, 8-bit
// data, 16-bit weights with 14 fraction bits, step size 2^-1) are this design's
// choices; the tap count 16 is the filter length of the reference system
// identification experiment.
package lms_pkg;

  // Default configuration.
  localparam int unsigned DEF_N        = 16; // number of taps
  localparam int unsigned DEF_L        = 8;  // data word length (x, d, e)
  localparam int unsigned DEF_WW       = 16; // weight word length
  localparam int unsigned DEF_WF       = 14; // weight fraction bits
  localparam int unsigned DEF_MU_SHIFT = 1;  // step size mu = 2^-MU_SHIFT
  localparam int unsigned DEF_REG_EVERY = 2; // adder-tree levels per pipeline stage

  // Pipeline stages of an adder tree with 'levels' levels and a register
  // after every 'reg_every' levels (the last level is always registered).
  function automatic int unsigned tree_latency(input int unsigned levels,
                                               input int unsigned reg_every);
    return (levels + reg_every - 1) / reg_every;
  endfunction

endpackage
