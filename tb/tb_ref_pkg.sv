// tb_ref_pkg: golden models used by the testbenches.
//
// Plain behavioural re-implementations, written independently of the RTL:
// a bit-serial CRC-4 (x^4 + x + 1) long division, the rate-1/2 K=3 (7,5)
// encoder, and a Viterbi decoder that keeps unbounded integer path metrics
// (no roll-over) with the same start rule as the design (state 0 keeps its metric, the
// other states 6 above it) and the same tie rule (the predecessor with the lower
// index wins). It also reports how the noise monitor should count: the
// number of times state 0's metric moves up into the next quarter of the
// 5-bit range.
package tb_ref_pkg;

  localparam int RL = 64;        // largest frame the models handle

  typedef bit [1:0] rsym_t;
  typedef bit       rbits_t [RL];
  typedef rsym_t    rsyms_t [RL];

  // Remainder of the n bits (MSB first) times x^4 modulo x^4 + x + 1.
  function automatic bit [3:0] ref_crc(input rbits_t b, input int n);
    bit [4:0] r;
    r = '0;
    for (int i = 0; i < n; i++) begin
      r = {r[3:0], 1'b0};
      if (r[4] ^ b[i]) r = r ^ 5'b1_0011;
      r[4] = 1'b0;
    end
    return r[3:0];
  endfunction

  // Encode n bits starting in state 0; symbol = {g=111 parity, g=101 parity}.
  function automatic rsyms_t ref_encode(input rbits_t b, input int n);
    rsyms_t s;
    bit d1, d2;              // previous bit, bit before that
    d1 = 0; d2 = 0;
    for (int i = 0; i < RL; i++) s[i] = '0;
    for (int i = 0; i < n; i++) begin
      s[i] = {b[i] ^ d1 ^ d2, b[i] ^ d2};
      d2 = d1;
      d1 = b[i];
    end
    return s;
  endfunction

  // Hard-decision Viterbi over n symbols ending in state 0.
  // State index = {previous bit, bit before that}. `base` is state 0's
  // metric when the frame starts and is updated to its metric at the end;
  // `pband` carries the last observed quarter (-1: none yet) and `noise`
  // counts the upward moves into the next quarter during this frame.
  function automatic void ref_viterbi(input rsyms_t s, input int n,
                                      output rbits_t out, output int noise,
                                      inout int base, inout int pband);
    int    pm [4];
    int    nm [4];
    bit    surv [RL][4];     // predecessor choice per step and state
    int    st, band;
    for (int k = 0; k < 4; k++) pm[k] = (k == 0) ? base : base + 6;
    noise = 0;
    for (int t = 0; t < n; t++) begin
      for (int ns = 0; ns < 4; ns++) begin
        int b, best;
        b = ns >> 1;
        best = -1;
        for (int x = 0; x < 2; x++) begin
          int ps, m;
          bit d1, d2;
          rsym_t e;
          ps = ((ns & 1) << 1) | x;     // predecessor: its newer bit is ns's older bit
          d1 = ps[1]; d2 = ps[0];
          e  = {b[0] ^ d1 ^ d2, b[0] ^ d2};
          m  = pm[ps] + int'(e[1] != s[t][1]) + int'(e[0] != s[t][0]);
          if (best < 0 || m < best) begin
            best = m;
            surv[t][ns] = x[0];
          end
        end
        nm[ns] = best;
      end
      pm = nm;
      band = (pm[0] % 32) / 8;
      if (pband >= 0 && band == (pband + 1) % 4) noise++;
      pband = band;
    end
    base = pm[0];
    st = 0;
    for (int i = 0; i < RL; i++) out[i] = 0;
    for (int t = n - 1; t >= 0; t--) begin
      out[t] = st[1];
      st = ((st & 1) << 1) | int'(surv[t][st]);
    end
  endfunction

endpackage
