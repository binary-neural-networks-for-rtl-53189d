// tb_sa_ref_pkg: behavioural reference of the N^2-parallel binary neural
// network for N queens, as computed by the systolic array: line sums over the
// current outputs, the motion equation with hill-climbing, U saturation and a
// hysteresis threshold. Used by the systolic testbenches to predict results
// without looking inside the RTL.
// The motion equation is the source design's; thresholds and saturation are
// this design's.
package tb_sa_ref_pkg;
  localparam int MAXN = 16;
  typedef int mat_t [MAXN][MAXN];

  function automatic void sums(input int n, input mat_t v, input int i, input int j,
                               output int r, output int c, output int d, output int a);
    r = 0; c = 0; d = 0; a = 0;
    for (int k = 0; k < n; k++) begin
      r += v[i][k];
      c += v[k][j];
    end
    for (int k = -n; k <= n; k++) begin
      if (k == 0) continue;
      if (i+k >= 0 && i+k < n && j+k >= 0 && j+k < n) d += v[i+k][j+k];
      if (i+k >= 0 && i+k < n && j-k >= 0 && j-k < n) a += v[i+k][j-k];
    end
  endfunction

  function automatic bit solved(input int n, input mat_t v);
    int r, c, d, a;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        sums(n, v, i, j, r, c, d, a);
        if (r != 1 || c != 1 || (v[i][j] == 1 && d + a != 0)) return 1'b0;
      end
    return 1'b1;
  endfunction

  // One parallel update of every neuron; chi selects C = 4.
  function automatic void step(input int n, input int uw, input bit chi,
                               inout mat_t u, inout mat_t v);
    mat_t nu, nv;
    int r, c, d, a, du, cc, umax, umin;
    umax = (1 << (uw-1)) - 1; umin = -(1 << (uw-1));
    cc = chi ? 4 : 1;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        sums(n, v, i, j, r, c, d, a);
        du = -(r-1) - (c-1) - (d+a) + cc*((r==0 ? 1:0) + (c==0 ? 1:0));
        nu[i][j] = u[i][j] + du;
        if (nu[i][j] > umax) nu[i][j] = umax;
        if (nu[i][j] < umin) nu[i][j] = umin;
        nv[i][j] = (nu[i][j] > 0) ? 1 : (nu[i][j] < 0) ? 0 : v[i][j];
      end
    u = nu; v = nv;
  endfunction

  // Full run: returns solved flag and number of updates applied.
  function automatic void run(input int n, input int uw, input int max_steps,
                              inout mat_t u, inout mat_t v, output bit ok, output int steps);
    steps = 0;
    forever begin
      if (solved(n, v)) begin ok = 1; return; end
      if (steps == max_steps) begin ok = 0; return; end
      step(n, uw, (steps % 20) < 5, u, v);
      steps++;
    end
  endfunction
endpackage
