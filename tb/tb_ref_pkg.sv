// tb_ref_pkg: reference models used by the testbenches.
//
// An encoder written as an explicit 7-bit shift register with the printed
// generator taps, and a plain Viterbi decoder over whole frames with
// unbounded integer path metrics. The decoder uses the same conventions as
// the RTL where the result would otherwise be ambiguous: start metrics 0 for
// state 0 and INIT for the others, a tie keeps the predecessor whose oldest
// bit is 0, trace back from a given end state.
package tb_ref_pkg;

  localparam int NS = 64;

  // Shift register r[0] = newest input ... r[6] = oldest; taps as printed:
  // G1 = 1111001, G2 = 1011011 (leftmost tap on the input).
  function automatic logic [1:0] ref_enc_step(ref logic [6:0] r, input logic u);
    logic [6:0] g1, g2;
    logic c1, c0;
    g1 = 7'b1111001;
    g2 = 7'b1011011;
    r = {r[5:0], u};
    c1 = 0; c0 = 0;
    for (int k = 0; k < 7; k++) begin
      c1 ^= g1[6-k] & r[k];
      c0 ^= g2[6-k] & r[k];
    end
    return {c1, c0};
  endfunction

  // Code pair for the transition from state s (bit 5 newest) with input u.
  function automatic logic [1:0] ref_branch(int s, logic u);
    logic [6:0] r;
    // rebuild the register before the shift: r[0] = s5 (newest) ... r[5] = s0
    r = '0;
    for (int k = 0; k < 6; k++) r[k] = s[5-k];
    return ref_enc_step(r, u);
  endfunction

  function automatic int ref_bm(int r0, int r1, bit e0, bit e1, logic [1:0] c);
    int m;
    m = 0;
    if (!e0) m += c[1] ? (7 - r0) : r0;
    if (!e1) m += c[0] ? (7 - r1) : r1;
    return m;
  endfunction

  // Decode n steps of soft pairs; returns the input bits of the ML path.
  function automatic void ref_decode(input int n, input int s0[], input int s1[],
                                     input bit e0[], input bit e1[], input int init_pm,
                                     input bit from_best, output bit bits[]);
    logic [63:0] dec[];
    int best;
    ref_trellis(n, s0, s1, e0, e1, init_pm, dec, best);
    ref_traceback(n, dec, from_best ? best : 0, bits);
  endfunction

  // Run the ACS recursion; returns each step's decisions and the best end state.
  function automatic void ref_trellis(input int n, input int s0[], input int s1[],
                                      input bit e0[], input bit e1[], input int init_pm,
                                      output logic [63:0] dec[], output int best);
    int pm[NS], npm[NS];
    dec = new[n];
    for (int s = 0; s < NS; s++) pm[s] = (s == 0) ? 0 : init_pm;
    for (int t = 0; t < n; t++) begin
      for (int ns = 0; ns < NS; ns++) begin
        int pa, pb, ma, mb;
        logic u;
        u  = ns[5];
        pa = ((ns & 31) << 1);
        pb = pa | 1;
        ma = pm[pa] + ref_bm(s0[t], s1[t], e0[t], e1[t], ref_branch(pa, u));
        mb = pm[pb] + ref_bm(s0[t], s1[t], e0[t], e1[t], ref_branch(pb, u));
        dec[t][ns] = (ma > mb);
        npm[ns] = (ma > mb) ? mb : ma;
      end
      pm = npm;
    end
    best = 0;
    for (int s = 1; s < NS; s++) if (pm[s] < pm[best]) best = s;
  endfunction

  // Trace back n steps from end state st; returns the input bits of the path.
  function automatic void ref_traceback(input int n, input logic [63:0] dec[], input int st,
                                        output bit bits[]);
    bits = new[n];
    for (int t = n - 1; t >= 0; t--) begin
      bits[t] = st[5];
      st = ((st << 1) & 63) | int'(dec[t][st]);
    end
  endfunction

endpackage
