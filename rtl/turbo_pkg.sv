// turbo_pkg: types, constants and arithmetic shared by the parallel turbo decoder.
//
// The constituent code is the 8-state recursive systematic code with octal
// generators g0=13 (feedback) and g1=17 (parity), the code used for the decoder's
// error-rate results. The bit order of the octal numbers (1+D^2+D^3 feedback,
// 1+D+D^2+D^3 parity) is this design's reading of them.
//
// State encoding: state[2] holds the newest register bit, state[0] the oldest.
// With a = u ^ state[1] ^ state[0] the parity is a ^ state[2] ^ state[1] ^ state[0]
// and the next state is {a, state[2], state[1]}.
//
// All soft values are two's complement. A positive LLR favours bit 1. One LSB is
// 1/4 nat, which sets the table of the E-function (max*) correction term.
package turbo_pkg;

  localparam int NSTATES = 8;

  // decoder phases: idle, interleaved-U pre-pass, SISO passes, finished
  typedef enum logic [1:0] {PH_IDLE, PH_UINT, PH_RUN, PH_DONE} phase_e;

  // Next state of the trellis for state s and input bit u.
  function automatic logic [2:0] trellis_next(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return {a, s[2], s[1]};
  endfunction

  // Parity bit emitted on the edge leaving state s with input bit u.
  function automatic logic trellis_parity(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return a ^ s[2] ^ s[1] ^ s[0];
  endfunction

  // Saturate a wide signed value to W bits.
  function automatic int sat(input int v, input int W);
    int hi;
    int lo;
    hi = (1 <<< (W - 1)) - 1;
    lo = -(1 <<< (W - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  // E-function operator of the log-domain MAP algorithm:
  // E{a,b} = max(a,b) + ln(1 + exp(-|a-b|)), the correction taken from a table
  // rounded to 1/4 nat steps.
  function automatic int emax(input int a, input int b);
    int d;
    int m;
    int c;
    d = (a > b) ? a - b : b - a;
    m = (a > b) ? a : b;
    if (d == 0) c = 3;
    else if (d <= 3) c = 2;
    else if (d <= 8) c = 1;
    else c = 0;
    return m + c;
  endfunction

endpackage
