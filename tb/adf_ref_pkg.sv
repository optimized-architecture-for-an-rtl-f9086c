// Reference model of the DA LMS adaptive filter for the testbenches, written
// from the arithmetic, not from the RTL structure.
//
// State: the 2^(N-1) OBC weight combinations Q_a (Q_a = sum_i W_i s_i(a), with
// s_0 = +1 and s_k = +1/-1 for bit (N-1-k) of a equal to 1/0; W_i = 2^FRAC w_i),
// stored as PW-bit words, and the last N input samples.
// Output:  2^(FRAC+1) y = sum over bit planes j of 2^j * sum_i W_i d_ij - sum_i W_i,
//          d_ij = +1/-1 for bit j of x(n-i) = 1/0, negated for j = B-1,
//          where sum_i W_i d_ij is looked up in the table directly or as the
//          negated mirror entry; -sum_i W_i is minus the last word.
// Update:  Q_a += floor(e * sum_i s_i(a) x(n-i) / 2^MU_SHIFT), every word.
package adf_ref_pkg;

  class adf_ref #(int N = 4, int B = 8, int YW = 16, int PW = 16, int FRAC = 8, int MU_SHIFT = 7);
    localparam int DEPTH = 2 ** (N - 1);
    longint q [DEPTH];
    longint x [N];

    function new();
      foreach (q[a]) q[a] = 0;
      foreach (x[i]) x[i] = 0;
    endfunction

    static function longint wrap(longint v, int w);
      longint m;
      m = (64'sd1 <<< w);
      v = v % m;
      if (v < 0) v += m;
      if (v >= m / 2) v -= m;
      return v;
    endfunction

    static function longint floor_shift(longint v, int sh);
      longint d, r;
      d = 64'sd1 <<< sh;
      r = v / d;
      if (r * d != v && v < 0) r -= 1;
      return r;
    endfunction

    function void push(longint sample);
      for (int i = N - 1; i > 0; i--) x[i] = x[i-1];
      x[0] = sample;
    endfunction

    // sign of x(n-k) in word a
    static function int sgn(int a, int k);
      if (k == 0) return 1;
      return ((a >> (N - 1 - k)) & 1) ? 1 : -1;
    endfunction

    function longint y_scaled();   // 2^(FRAC+1) * y
      longint acc;
      acc = -q[DEPTH-1];
      acc = wrap(acc, PW);
      for (int j = 0; j < B; j++) begin
        int a, pos;
        longint v;
        pos = ((x[0] >> j) & 1);
        a = 0;
        for (int k = 1; k < N; k++) begin
          int bit_k;
          bit_k = int'((x[k] >> j) & 1);
          // table is indexed with x(n) positive; mirror when its digit is -1
          if (pos == 0) bit_k = 1 - bit_k;
          a = (a << 1) | bit_k;
        end
        v = (pos != 0) ? q[a] : -q[a];
        if (j == B - 1) v = -v;
        acc += v * (64'sd1 <<< j);
      end
      return acc;
    endfunction

    function longint y_out();
      return wrap(y_scaled() >>> (FRAC + 1), YW);
    endfunction

    function void adapt(longint e);
      for (int a = 0; a < DEPTH; a++) begin
        longint t;
        t = 0;
        for (int k = 0; k < N; k++) t += sgn(a, k) * x[k];
        q[a] = wrap(q[a] + wrap(floor_shift(e * t, MU_SHIFT), PW), PW);
      end
    endfunction
  endclass

endpackage
