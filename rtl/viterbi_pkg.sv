// viterbi_pkg: constants and trellis helper functions shared by the
// Viterbi decoder blocks.
//
// The decoder works on a rate-1/2 convolutional code whose received symbols
// carry two code bits, so the branch metric unit produces four metrics, one
// per possible symbol 00, 01, 10 and 11. State and branch metrics are 5 bits
// wide. The state metrics are never normalised: they are allowed to roll
// over, and compared through their modular difference.
//
// Constraint length 3 with generators 7 and 5 (octal), the CRC-4 polynomial
// x^4 + x + 1, the 8-bit information frame and the tail of K-1 zero bits are
// this design's own choices.
//
// Trellis convention used by every block: a state holds the last K-1 input
// bits with the newest bit in the MSB. Input bit b taken from state s gives
// next state {b, s[K-2:1]}; the two predecessors of state n are
// {n[K-3:0], x} for x = 0, 1, and the input bit of any branch into n is
// n[K-2].
package viterbi_pkg;

  // Code
  parameter int unsigned K        = 3;              // constraint length
  parameter int unsigned NS       = 1 << (K - 1);   // trellis states
  parameter int unsigned SW       = K - 1;          // state index width
  parameter logic [K-1:0] G0      = 3'b111;         // generator of code bit 1 (MSB: newest bit)
  parameter logic [K-1:0] G1      = 3'b101;         // generator of code bit 0

  // Metric resolution
  parameter int unsigned SM_W     = 5;              // state (path) metric bits
  parameter int unsigned BM_W     = 5;              // branch metric bits

  // Frame layout: information bits, then CRC bits, then a zero tail
  parameter int unsigned INFO_BITS = 8;
  parameter int unsigned CRC_W     = 4;
  parameter logic [CRC_W-1:0] CRC_POLY = 4'h3;      // x^4 + x + 1, x^4 implied
  parameter int unsigned TAIL      = K - 1;
  parameter int unsigned FRAME_LEN = INFO_BITS + CRC_W + TAIL;

  typedef logic [1:0] sym_t;                        // one received symbol {c1, c0}

  // Code symbol produced by input bit b leaving state s.
  function automatic sym_t encode_sym(input logic b, input logic [SW-1:0] s);
    logic [K-1:0] r;
    r = {b, s};
    return {^(r & G0), ^(r & G1)};
  endfunction

  // Predecessor of state n along the branch selected by decision bit x.
  function automatic logic [SW-1:0] pred_state(input logic [SW-1:0] n, input logic x);
    return {n[SW-2:0], x};
  endfunction

endpackage
