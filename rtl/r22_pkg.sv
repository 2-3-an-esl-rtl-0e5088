// r22_pkg: constants and elaboration-time helpers shared by the radix-2^2
// multi-path delay commutator FFT (R2^2EMDC).
//
// The default sizes are the N = 16 examples the architecture is usually drawn
// with (two parallel R2^2MDC paths, T = 2). The data and twiddle widths are this
// design's own choice. The helper functions describe where each sample of a
// frame sits (which lane, which beat), so the datapath modules and the
// testbenches agree on the data order:
//   * the input lane l in beat c of a frame carries x[l*N/(2T) + c];
//   * the butterfly stage s works on index bit m-1-s (decimation in frequency);
//   * the output lane q in beat c carries X[bitrev_m(q/2 * N/T + 2c + q%2)].
package r22_pkg;

  localparam int unsigned DEF_N  = 16;  // FFT length
  localparam int unsigned DEF_T  = 2;   // degree of parallelism (t)
  localparam int unsigned DEF_W  = 16;  // input sample width (real and imaginary)
  localparam int unsigned DEF_TW = 16;  // twiddle width, Q1.(TW-1)

  // Reverse the low `bits` bits of v.
  function automatic int unsigned bitrev(int unsigned v, int unsigned bits);
    int unsigned r = 0;
    for (int unsigned i = 0; i < bits; i++) r |= ((v >> i) & 1) << (bits - 1 - i);
    return r;
  endfunction

  // Remove bit `pos` from v, closing the gap (the bits above move down by one).
  function automatic int unsigned drop_bit(int unsigned v, int unsigned pos);
    int unsigned lo = v & ((1 << pos) - 1);
    int unsigned hi = v >> (pos + 1);
    return (hi << pos) | lo;
  endfunction

  // Insert bit b at position `pos` of v (inverse of drop_bit).
  function automatic int unsigned ins_bit(int unsigned v, int unsigned pos, int unsigned b);
    int unsigned lo = v & ((1 << pos) - 1);
    int unsigned hi = v >> pos;
    return (hi << (pos + 1)) | ((b & 1) << pos) | lo;
  endfunction

  // Lane of a stage input that holds spatial address a when the stage pairs
  // on spatial address bit j: lane = {a without bit j, a[j]}.
  function automatic int unsigned lane_of(int unsigned a, int unsigned j);
    return (drop_bit(a, j) << 1) | ((a >> j) & 1);
  endfunction

  // Spatial address held by lane q of a stage that pairs on spatial bit j.
  function automatic int unsigned addr_of(int unsigned q, int unsigned j);
    return ins_bit(q >> 1, j, q & 1);
  endfunction

  // Position (in-place index of the decimation-in-frequency flow graph) of the
  // sample that lane q of butterfly stage k (the stage pairing on index bit k)
  // holds at local beat tau. tb = log2(N/(2T)) is the number of beat bits.
  //   spatial stage (k >= tb): the lanes hold the top index bits, beat = low bits;
  //   temporal stage (k < tb): lane pair q/2 holds the bits above tb, the port
  //   q%2 holds bit k, and beat bit i holds index bit i+1 for i >= k.
  function automatic int unsigned stage_pos(int unsigned q, int unsigned tau,
                                            int unsigned k, int unsigned tb);
    int unsigned lo, hi;
    if (k >= tb) return (addr_of(q, k - tb) << tb) | tau;
    lo = tau & ((1 << k) - 1);
    hi = tau >> k;
    return ((q >> 1) << (tb + 1)) | (hi << (k + 1)) | ((q & 1) << k) | lo;
  endfunction

endpackage
