// dp_ref_pkg: reference model for the DP matching testbenches.
// diag(i,j) = DIAG_N - max(0, w - |t[i] - x[j]|) and a constant skip
// penalty p give D(N,N) by the recurrence
//   D(i,j) = min(D(i,j-1) + p, D(i-1,j-1) + diag(i-1,j-1), D(i-1,j) + p).
package dp_ref_pkg;
  localparam int MAXN = 16;
  typedef int vec_t [MAXN];

  function automatic int diag_delay(int t, int x, int w, int diag_n);
    int d, ov;
    d  = (t > x) ? t - x : x - t;
    ov = w - d; if (ov < 0) ov = 0; if (ov > diag_n) ov = diag_n;
    return diag_n - ov;
  endfunction

  // returns D(n,n); diag_only is the delay of the pure diagonal path
  function automatic int dp_score(vec_t x, vec_t t, int n, int w, int p,
                                  int diag_n, output int diag_only);
    int D [MAXN+1][MAXN+1];
    diag_only = 0;
    for (int i = 0; i < n; i++) diag_only += diag_delay(t[i], x[i], w, diag_n);
    for (int i = 0; i <= n; i++)
      for (int j = 0; j <= n; j++) begin
        int best;
        if (i == 0 && j == 0) begin D[i][j] = 0; continue; end
        best = 1 << 30;
        if (j > 0 && D[i][j-1] + p < best) best = D[i][j-1] + p;
        if (i > 0 && D[i-1][j] + p < best) best = D[i-1][j] + p;
        if (i > 0 && j > 0 && D[i-1][j-1] + diag_delay(t[i-1], x[j-1], w, diag_n) < best)
          best = D[i-1][j-1] + diag_delay(t[i-1], x[j-1], w, diag_n);
        D[i][j] = best;
      end
    return D[n][n];
  endfunction
endpackage
