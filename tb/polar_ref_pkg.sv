// polar_ref_pkg: reference models used by the testbenches. They are written
// independently of the RTL structures:
//  * ref_encode  - x = u * B_N * F^{(x)n} by bit-reversing u and running the
//                  butterfly of the Kronecker power (not the tree).
//  * ref_pe_real - Bhattacharyya recursion Z(2i) = 2Z - Z^2, Z(2i+1) = Z^2
//                  in floating point for all N split channels at once.
//  * ref_pe_fix  - bit-exact model of the fixed-point hardware, with f
//                  written as 1 - trunc((1-x)^2) instead of 2x - trunc(x^2).
package polar_ref_pkg;

  localparam int MAXN = 1024;

  function automatic int bitrev(int i, int n);
    int r = 0;
    for (int b = 0; b < n; b++) if (i[b]) r |= 1 << (n - 1 - b);
    return r;
  endfunction

  function automatic logic [MAXN-1:0] ref_encode(logic [MAXN-1:0] u, int n);
    logic [MAXN-1:0] y = '0;
    int N = 1 << n;
    for (int i = 0; i < N; i++) y[i] = u[bitrev(i, n)];
    for (int s = 1; s < N; s *= 2)
      for (int i = 0; i < N; i++)
        if ((i & s) == 0) y[i] = y[i] ^ y[i+s];
    return y;
  endfunction

  // z[k] for k = 0 .. 2^n-1, channel parameter a.
  function automatic void ref_pe_real(real a, int n, ref real z[]);
    real cur[];
    real nxt[];
    cur = new[1];
    cur[0] = a;
    for (int t = 0; t < n; t++) begin
      nxt = new[cur.size() * 2];
      for (int i = 0; i < cur.size(); i++) begin
        nxt[2*i]   = 2.0 * cur[i] - cur[i] * cur[i];
        nxt[2*i+1] = cur[i] * cur[i];
      end
      cur = nxt;
    end
    z = cur;
  endfunction

  function automatic longint ref_pe_fix(longint a, int k, int n, int frac);
    longint one = longint'(1) << frac;
    longint v = a;
    for (int t = 0; t < n; t++) begin
      if (k[n-1-t]) v = (v * v) >> frac;
      else          v = one - (((one - v) * (one - v)) >> frac);
    end
    return v;
  endfunction

endpackage
