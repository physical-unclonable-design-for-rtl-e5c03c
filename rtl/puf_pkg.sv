// puf_pkg -- constants of the ring-oscillator PUF and the process-variation
// model used to give each behavioural ring oscillator its own stage delay.
//
// A silicon ring oscillator's frequency is set by fabrication spread; in
// simulation that spread is stood in for by ro_stage_delay_ps(), which hashes
// a die seed and the oscillator's index into a stage delay of
// RO_NOMINAL_PS +/- RO_SPREAD_PS picoseconds. Changing the seed models a
// different chip and therefore a different key. These numbers are this
// design's own choice; the original description gives none.
package puf_pkg;

  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned KEY_BITS      = 128;  // one PUF bit per key bit
  localparam int unsigned RO_STAGES     = 5;    // stages per ring oscillator
  localparam int unsigned RO_NOMINAL_PS = 100;  // nominal delay of one stage
  localparam int unsigned RO_SPREAD_PS  = 10;   // +/- fabrication spread

  // 32-bit integer mixing hash (multiply / xor-shift).
  function automatic int unsigned mix32(int unsigned x);
    x = x ^ (x >> 16);
    x = x * 32'h7feb352d;
    x = x ^ (x >> 15);
    x = x * 32'h846ca68b;
    x = x ^ (x >> 16);
    return x;
  endfunction

  // Stage delay in ps of ring oscillator idx on the die called die_seed.
  function automatic int unsigned ro_stage_delay_ps(int unsigned die_seed, int unsigned idx);
    int unsigned h;
    h = mix32(die_seed * 32'h9e3779b1 + idx + 1);
    return RO_NOMINAL_PS - RO_SPREAD_PS + h % (2 * RO_SPREAD_PS + 1);
  endfunction

endpackage
