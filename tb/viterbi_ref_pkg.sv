// viterbi_ref_pkg: reference models for the testbenches, written directly
// from the code's definition and independent of the RTL.
//
// enc_pair gives the rate-1/2 code bits for input x from state {a, b}
// (a = x(n-1), b = x(n-2)): z1 = x^a^b, z0 = x^b. viterbi_ref is an
// unnormalised hard-decision Viterbi decoder: it keeps integer path metrics
// (S00 starts at 0, the others at 128), keeps the upper predecessor on a
// tie, stores one decision per state per step, and traces back depth+1
// steps from the lowest-numbered state with the smallest metric.
package viterbi_ref_pkg;

  function automatic logic [1:0] enc_pair(int s, bit x);
    bit a, b;
    a = s[1];
    b = s[0];
    return {x ^ a ^ b, x ^ b};
  endfunction

  function automatic int ham2(logic [1:0] p, logic [1:0] q);
    return int'(p[1] != q[1]) + int'(p[0] != q[0]);
  endfunction

  class viterbi_ref;
    int H[4];
    bit dec[$][4];           // dec[t][j] = 1 when state j at step t came from below
    int ties;

    function new();
      H = '{0, 128, 128, 128};
      ties = 0;
    endfunction

    function void step(logic [1:0] sym);
      int Hn[4];
      bit d[4];
      for (int j = 0; j < 4; j++) begin
        int up, dn, su, sd;
        bit x;
        x  = j[1];
        up = 2 * j[0];
        dn = 2 * j[0] + 1;
        su = H[up] + ham2(enc_pair(up, x), sym);
        sd = H[dn] + ham2(enc_pair(dn, x), sym);
        if (su == sd) ties++;
        d[j]  = (sd < su);
        Hn[j] = d[j] ? sd : su;
      end
      H = Hn;
      dec.push_back(d);
    endfunction

    function int best();
      int b = 0;
      for (int j = 1; j < 4; j++) if (H[j] < H[b]) b = j;
      return b;
    endfunction

    // bit decided by tracing back depth+1 steps from the newest column
    function bit traceback(int depth);
      int s = best();
      int t = dec.size() - 1;
      for (int i = 0; i <= depth; i++) begin
        s = 2 * (s % 2) + int'(dec[t - i][s]);
      end
      return s[1];
    endfunction
  endclass

endpackage
