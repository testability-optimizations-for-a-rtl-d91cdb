// ecpld_ref_pkg: behavioural reference model of the eCPLD used by the
// testbenches. It evaluates an ePLD configuration directly from its bit layout
// (see ecpld_pkg), independently of the RTL structure, and generates random
// configurations.
//
// epld_step computes the next macrocell and test-extension flop values. In
// functional mode it resolves the feedback columns by repeated passes, marking
// a column known only when every programmed input of its row is known; a
// configuration with an active feedback loop therefore reports ok = 0. In
// SCANMODE the feedback columns come from the flops, so every configuration is
// resolvable in one pass.
package ecpld_ref_pkg;

  localparam int MAXB = 4096;
  typedef bit [MAXB-1:0] cfgv_t;

  function automatic int ncol(int n_in, int n_mc); return n_in + 3 * n_mc; endfunction
  function automatic int nrow(int n_mc, int n_pt); return n_mc * (n_pt + 1); endfunction
  function automatic int cfg_bits(int n_in, int n_mc, int n_pt);
    return 2 * nrow(n_mc, n_pt) * ncol(n_in, n_mc) + 2 * n_mc * n_pt;
  endfunction

  function automatic void epld_step(int n_in, int n_mc, int n_pt, cfgv_t cfg,
                                    bit [63:0] in, bit [63:0] q, bit [63:0] te,
                                    bit scanmode,
                                    output bit [63:0] q_n, output bit [63:0] te_n,
                                    output bit ok);
    int nc = ncol(n_in, n_mc);
    int nr = nrow(n_mc, n_pt);
    int orb = 2 * nr * nc;
    bit [255:0] col, known;
    bit [255:0] rowv, rowk;
    bit changed;
    col = '0; known = '0; rowv = '0; rowk = '0;
    for (int i = 0; i < n_in; i++) begin col[i] = in[i]; known[i] = 1; end
    for (int m = 0; m < n_mc; m++) begin
      col[n_in+3*m+2] = q[m]; known[n_in+3*m+2] = 1;
      if (scanmode) begin
        col[n_in+3*m]   = te[m]; known[n_in+3*m]   = 1;
        col[n_in+3*m+1] = q[m];  known[n_in+3*m+1] = 1;
      end
    end
    for (int pass = 0; pass < nr + n_mc + 2; pass++) begin
      changed = 0;
      for (int r = 0; r < nr; r++) begin
        if (!rowk[r]) begin
          bit all_k = 1, v = 1;
          for (int c = 0; c < nc; c++)
            if (cfg[2*r*nc+c]) begin
              if (!known[c]) all_k = 0;
              else v &= col[c] ^ cfg[(2*r+1)*nc+c];
            end
          if (all_k) begin rowv[r] = v; rowk[r] = 1; changed = 1; end
        end
      end
      for (int m = 0; m < n_mc; m++) begin
        int r0 = m * (n_pt + 1);
        if (!scanmode && !known[n_in+3*m] && rowk[r0+n_pt]) begin
          col[n_in+3*m] = rowv[r0+n_pt]; known[n_in+3*m] = 1; changed = 1;
        end
        if (!scanmode && !known[n_in+3*m+1]) begin
          bit all_k = 1, v = 0;
          for (int p = 0; p < n_pt; p++)
            if (cfg[orb+2*m*n_pt+p]) begin
              if (!rowk[r0+p]) all_k = 0;
              else v |= rowv[r0+p] ^ cfg[orb+(2*m+1)*n_pt+p];
            end
          if (all_k) begin col[n_in+3*m+1] = v; known[n_in+3*m+1] = 1; changed = 1; end
        end
      end
      if (!changed) break;
    end
    ok = 1; q_n = '0; te_n = '0;
    for (int m = 0; m < n_mc; m++) begin
      int r0 = m * (n_pt + 1);
      bit v = 0;
      for (int p = 0; p < n_pt; p++)
        if (cfg[orb+2*m*n_pt+p]) begin
          if (!rowk[r0+p]) ok = 0;
          v |= rowv[r0+p] ^ cfg[orb+(2*m+1)*n_pt+p];
        end
      q_n[m] = v;
      if (!rowk[r0+n_pt]) ok = 0;
      te_n[m] = rowv[r0+n_pt];
    end
  endfunction

  // Random configuration. Without loops, a row of macrocell m may use the
  // inputs, any register column, the expansion/combinational columns of lower
  // macrocells and, for its OR-ed rows, its own expansion term. With loops any
  // column may be used.
  function automatic cfgv_t gen_cfg(int n_in, int n_mc, int n_pt, bit loops);
    cfgv_t cfg = '0;
    int nc = ncol(n_in, n_mc);
    int orb = 2 * nrow(n_mc, n_pt) * nc;
    for (int m = 0; m < n_mc; m++)
      for (int k = 0; k <= n_pt; k++) begin
        int r = m * (n_pt + 1) + k;
        int nsel = 1 + ($urandom % 3);
        for (int s = 0; s < nsel; s++) begin
          int c;
          bit good;
          do begin
            c = $urandom % nc;
            good = 1;
            if (!loops && c >= n_in) begin
              int j = (c - n_in) / 3, t = (c - n_in) % 3;
              if (t == 0 && j > m) good = 0;
              if (t == 0 && j == m && k == n_pt) good = 0;
              if (t == 1 && j >= m) good = 0;
            end
          end while (!good);
          cfg[2*r*nc+c]   = 1;
          cfg[(2*r+1)*nc+c] = $urandom % 2;
        end
      end
    for (int m = 0; m < n_mc; m++)
      for (int p = 0; p < n_pt; p++) begin
        cfg[orb+2*m*n_pt+p]     = ($urandom % 4) != 0;
        cfg[orb+(2*m+1)*n_pt+p] = ($urandom % 4) == 0;
      end
    return cfg;
  endfunction

  // How many programmed nodes use an expansion or combinational feedback column.
  function automatic int feedback_uses(int n_in, int n_mc, int n_pt, cfgv_t cfg);
    int nc = ncol(n_in, n_mc);
    int n = 0;
    for (int r = 0; r < nrow(n_mc, n_pt); r++)
      for (int m = 0; m < n_mc; m++) begin
        if (cfg[2*r*nc+n_in+3*m])   n++;
        if (cfg[2*r*nc+n_in+3*m+1]) n++;
      end
    return n;
  endfunction

endpackage
