// dmm_ref_pkg: software reference models of the three kernels, used by the
// system testbenches. Each model draws its random numbers from the same 16-bit
// LFSR sequence as the accelerators (seed 16'hACE1, shift right, feedback
// bit0^bit2^bit3^bit5, value = min + state mod (max-min+1)) and uses 32-bit C
// integer arithmetic, so its results must match the hardware bit for bit.
package dmm_ref_pkg;

  function automatic logic [15:0] lfsr_step(logic [15:0] l);
    return {l[0] ^ l[2] ^ l[3] ^ l[5], l[15:1]};
  endfunction

  // Histogram: hbin[c][v] for the blue (0), green (1) and red (2) channels.
  function automatic void hist_model(int n, output int hbin [3][256], output int result);
    logic [15:0] l = 16'hACE1;
    int pix [$];
    for (int c = 0; c < 3; c++) for (int v = 0; v < 256; v++) hbin[c][v] = 0;
    for (int i = 0; i < n; i++) begin
      l = lfsr_step(l);
      pix.push_back((1 + int'(l) % (i + 1)) & 8'hFF);
    end
    result = 0;
    for (int i = 0; i < n; i += 3) begin
      for (int c = 0; c < 3; c++) hbin[c][pix[i + c]]++;
      result += 3;
    end
  endfunction

  // PCA: sum of the covariance matrix of `rows` vectors of `cols` values, plus n_pca.
  function automatic int pca_model(int rows, int cols, int grid, int n_pca);
    logic [15:0] l = 16'hACE1;
    int m [$], mean [$], sum, cv, res;
    for (int k = 0; k < rows * cols; k++) begin
      l = lfsr_step(l);
      m.push_back(1 + int'(l) % grid);
    end
    for (int i = 0; i < rows; i++) begin
      sum = 0;
      for (int j = 0; j < cols; j++) sum += m[i * cols + j];
      mean.push_back(sum / cols);
    end
    res = n_pca;
    for (int i = 0; i < rows; i++)
      for (int j = i; j < rows; j++) begin
        sum = 0;
        for (int k = 0; k < cols; k++)
          sum += (m[i * cols + k] - mean[i]) * (m[j * cols + k] - mean[j]);
        cv  = sum / (cols - 1);
        res += (i == j) ? cv : 2 * cv;
      end
    return res;
  endfunction

  // Matrix multiplication: sum of the elements of A*B, A drawn before B.
  function automatic int mmul_model(int dim, int grid);
    logic [15:0] l = 16'hACE1;
    int a [$], res;
    for (int k = 0; k < 2 * dim * dim; k++) begin
      l = lfsr_step(l);
      a.push_back(1 + int'(l) % grid);
    end
    res = 0;
    for (int i = 0; i < dim; i++)
      for (int j = 0; j < dim; j++)
        for (int k = 0; k < dim; k++)
          res += a[i * dim + k] * a[dim * dim + k * dim + j];
    return res;
  endfunction

  // K-means: sum of the final means' coordinates; iterations returned too.
  function automatic int kmeans_model(int npts, int dim, int ncl, int grid, int max_iter,
                                      output int iters);
    logic [15:0] l = 16'hACE1;
    int pt [$], mean [$], cl [$], csum [$], ccnt [$];
    int best, bd, dd, df, res;
    bit modified;
    for (int k = 0; k < npts * dim; k++) begin
      l = lfsr_step(l);
      pt.push_back(1 + int'(l) % grid);
    end
    for (int k = 0; k < ncl * dim; k++) mean.push_back(pt[k]);
    for (int i = 0; i < npts; i++) cl.push_back(ncl);
    iters = 0;
    do begin
      modified = 0;
      csum = {};
      ccnt = {};
      for (int k = 0; k < ncl * dim; k++) csum.push_back(0);
      for (int k = 0; k < ncl; k++) ccnt.push_back(0);
      for (int i = 0; i < npts; i++) begin
        best = 0;
        bd   = 0;
        for (int k = 0; k < ncl; k++) begin
          dd = 0;
          for (int e = 0; e < dim; e++) begin
            df = pt[i * dim + e] - mean[k * dim + e];
            dd += df * df;
          end
          if (k == 0 || unsigned'(dd) < unsigned'(bd)) begin
            bd = dd;
            best = k;
          end
        end
        if (cl[i] != best) modified = 1;
        cl[i] = best;
        for (int e = 0; e < dim; e++) csum[best * dim + e] += pt[i * dim + e];
        ccnt[best]++;
      end
      for (int k = 0; k < ncl; k++)
        if (ccnt[k] != 0)
          for (int e = 0; e < dim; e++) mean[k * dim + e] = csum[k * dim + e] / ccnt[k];
      iters++;
    end while (modified && iters < max_iter);
    res = 0;
    foreach (mean[k]) res += mean[k];
    return res;
  endfunction

endpackage
