// rbg_pkg: constants and helper functions shared by the combined ring-oscillator
// random bit generator.
//
// - N_LUT is the number of inputs of one FPGA lookup table (6 on Virtex-5); the
//   XOR tree never combines more than N_LUT streams in one group.
// - RO_FREQ_MHZ holds the measured frequencies of 64 ring oscillators whose
//   delay lines use 1..64 carry-chain taps on a Virtex-5 (RO number l uses l
//   taps). The behavioural ring-oscillator model uses them to calibrate its
//   interconnect delay, so that the simulated rings run at these frequencies.
// - xor_level_width() and xor_tree_levels() give the shape of the XOR tree:
//   level 0 holds the K source streams, level i+1 holds ceil(w_i / N_LUT)
//   registered XORs of level i, and the tree ends when one bit remains.
`timescale 1ns/1ps
package rbg_pkg;

  localparam int unsigned N_LUT     = 6;
  localparam int unsigned NUM_RO_TABLE = 64;

  // Measured frequency of the RO with l carry4 taps, index l-1, in MHz.
  localparam int unsigned RO_FREQ_MHZ [NUM_RO_TABLE] = '{
    639, 739, 599, 499, 461, 462, 382, 433, 418, 454, 417, 355, 373, 375, 400, 391,
    366, 341, 368, 359, 383, 353, 358, 370, 330, 293, 325, 327, 294, 328, 324, 292,
    339, 400, 282, 402, 262, 348, 331, 264, 251, 375, 360, 242, 221, 239, 235, 229,
    231, 310, 234, 226, 242, 224, 222, 171, 219, 223, 179, 214, 207, 210, 274, 187
  };

  // Number of streams at level `level` of an XOR tree with `k` inputs and
  // groups of at most `n` streams.
  function automatic int unsigned xor_level_width(int unsigned k, int unsigned n,
                                                  int unsigned level);
    int unsigned w = k;
    for (int unsigned i = 0; i < level; i++) w = (w + n - 1) / n;
    return w;
  endfunction

  // Number of registered levels (and so the latency in f_L cycles) of the tree.
  // One input still takes one sampling register.
  function automatic int unsigned xor_tree_levels(int unsigned k, int unsigned n);
    int unsigned w = k;
    int unsigned l = 0;
    do begin
      w = (w + n - 1) / n;
      l++;
    end while (w > 1);
    return l;
  endfunction

  // Half period of an RO running at f MHz, in picoseconds.
  function automatic int unsigned half_period_ps(int unsigned f_mhz);
    return 500_000 / f_mhz;
  endfunction

endpackage
