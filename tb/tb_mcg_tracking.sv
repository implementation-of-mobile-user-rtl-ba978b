// Tracking workload for mcg_systolic_array at its default size (M = 4
// antennas), with N = 2 users.
//
// The testbench plays the host: it builds the antenna snapshots, keeps
// the correlation matrix R(n) = lambda R(n-1) + x x^H, and runs the
// sample-by-sample modified conjugate gradient (MCG) recursion for each
// user in floating point, except that every product the hardware is meant
// to deliver comes from the array:
//   alpha = eta * p^H g / p^H R p          (pg, pv from the array)
//   w    += alpha p
//   g     = lambda g - alpha v + x (d - x^H w_old)       (v from the array)
//   beta  = max((g - g_old)^H g / g_old^H g_old, 0)       (gg from the array)
//   p     = g + beta p
// Per sample the host preloads R(n-1) (M steps) and then issues one
// (p, g) pair per user back to back; both users share the loaded R.
//
// Checks: every product from the array agrees with the same product
// computed in floating point from the quantised inputs (tolerance a few
// LSBs per term); the results come back 2M cycles after issue; no value
// sent to the array saturates; and at the end each user's weight vector
// points along that user's steering vector (normalised correlation above
// 0.95), i.e. the tracker has locked on, and the angle read from the
// phase step between neighbouring weights is within 3 degrees of the
// user's. Users at -20 and +35 degrees on a half-wavelength line array,
// BPSK symbols, light noise. The forgetting factor lambda = 0.9 and eta = 0.6 lie in the
// range (lambda - 0.5) <= eta <= lambda that the MCG method asks for.
module tb_mcg_tracking;
  import mts_pkg::*;

  localparam int unsigned M = 4;
  localparam int unsigned N = 2;
  localparam int unsigned SAMPLES = 300;
  localparam real LAMBDA = 0.9;
  localparam real ETA    = 0.6;
  localparam real AMP    = 0.35;
  localparam real NOISE  = 0.02;
  localparam real PI     = 3.14159265358979;
  localparam real SCALE  = 4096.0;  // 2**FRAC

  int checks = 0;
  int failures = 0;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic           r_load = 1'b0;
  cdata_t [M-1:0] r_row;
  logic           r_ready, busy;
  logic           in_valid = 1'b0;
  cdata_t [M-1:0] p_vec, g_vec;
  logic           out_valid;
  cacc_t          pg, pv;
  aword_t         gg;
  cacc_t  [M-1:0] v_vec;

  always #5 clk = ~clk;

  mcg_systolic_array dut (.*);

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // host state, complex values as separate real and imaginary arrays
  real Rr[M][M], Ri[M][M];
  real wr[N][M], wi[N][M], gr[N][M], gi[N][M], pr[N][M], pi_[N][M];
  real ar[N][M], ai[N][M];          // steering vectors
  real xr[M], xi[M];
  real dsym[N];
  int  n_sat = 0;
  int  n_beta_reset = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  function automatic dword_t quant(input real x);
    real s;
    s = x * SCALE;
    if (s > 32767.0)  begin n_sat++; return 16'sh7fff; end
    if (s < -32768.0) begin n_sat++; return 16'sh8000; end
    return dword_t'($rtoi(s < 0.0 ? s - 0.5 : s + 0.5));
  endfunction

  function automatic real deq(input aword_t x);
    return $itor(x) / SCALE;
  endfunction

  function automatic real absr(input real x);
    return x < 0.0 ? -x : x;
  endfunction

  initial begin : watchdog
    repeat (SAMPLES * (3 * M + N + 4) + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real    theta[N];
    real    qpr[N][M], qpi[N][M], qgr[N][M], qgi[N][M], qRr[M][M], qRi[M][M];
    real    hv_r, hv_i, hpg_r, hpg_i, hpv_r, hpv_i, hgg;
    real    v_r[N][M], v_i[N][M], apg_r[N], apg_i[N], apv_r[N], apv_i[N], agg[N];
    real    alpha_r, alpha_i, den, e_r, e_i, yr, yi, num, beta;
    real    goldr[M], goldi[M], corr_r, corr_i, nw, na;
    real    tol, ph_r, ph_i, th_est;
    longint t_issue;
    int     got;

    theta[0] = -20.0 * PI / 180.0;
    theta[1] =  35.0 * PI / 180.0;
    for (int a = 0; a < M; a++)
      for (int b = 0; b < M; b++) begin
        Rr[a][b] = 0.0; Ri[a][b] = 0.0;
      end
    for (int k = 0; k < N; k++)
      for (int m = 0; m < M; m++) begin
        wr[k][m] = 0.0; wi[k][m] = 0.0; gr[k][m] = 0.0; gi[k][m] = 0.0;
        pr[k][m] = 0.0; pi_[k][m] = 0.0;
      end

    r_row = '0; p_vec = '0; g_vec = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int n = 0; n < SAMPLES; n++) begin
      // ---- preload R(n-1)
      for (int a = 0; a < M; a++)
        for (int b = 0; b < M; b++) begin
          qRr[a][b] = $itor(quant(Rr[a][b])) / SCALE;
          qRi[a][b] = $itor(quant(Ri[a][b])) / SCALE;
        end
      for (int t = 0; t < M; t++) begin
        r_load = 1'b1;
        for (int c = 0; c < M; c++) begin
          r_row[c].re = quant(Rr[c][M-1-t]);
          r_row[c].im = quant(Ri[c][M-1-t]);
        end
        @(negedge clk);
      end
      r_load = 1'b0;
      #1;
      check(r_ready, "r_ready after preload");

      // ---- issue p(n-1), g(n-1) of every user back to back
      t_issue = cyc;
      for (int k = 0; k < N; k++) begin
        for (int c = 0; c < M; c++) begin
          p_vec[c].re = quant(pr[k][c]);  p_vec[c].im = quant(pi_[k][c]);
          g_vec[c].re = quant(gr[k][c]);  g_vec[c].im = quant(gi[k][c]);
          qpr[k][c] = $itor(p_vec[c].re) / SCALE; qpi[k][c] = $itor(p_vec[c].im) / SCALE;
          qgr[k][c] = $itor(g_vec[c].re) / SCALE; qgi[k][c] = $itor(g_vec[c].im) / SCALE;
        end
        in_valid = 1'b1;
        @(negedge clk);
      end
      in_valid = 1'b0;
      p_vec = '0; g_vec = '0;

      // ---- collect the results
      got = 0;
      while (got < N) begin
        @(posedge clk);
        if (out_valid) begin
          check(cyc - t_issue == longint'(2 * M + got), "result 2M cycles after issue");
          for (int c = 0; c < M; c++) begin
            v_r[got][c] = deq(v_vec[c].re); v_i[got][c] = deq(v_vec[c].im);
          end
          apg_r[got] = deq(pg.re); apg_i[got] = deq(pg.im);
          apv_r[got] = deq(pv.re); apv_i[got] = deq(pv.im);
          agg[got]   = deq(gg);
          got++;
        end
      end
      @(negedge clk);

      // ---- compare with floating-point products of the quantised inputs
      tol = 4.0 * M / SCALE;
      for (int k = 0; k < N; k++) begin
        hpg_r = 0.0; hpg_i = 0.0; hpv_r = 0.0; hpv_i = 0.0; hgg = 0.0;
        for (int c = 0; c < M; c++) begin
          hv_r = 0.0; hv_i = 0.0;
          for (int j = 0; j < M; j++) begin
            hv_r += qRr[c][j] * qpr[k][j] - qRi[c][j] * qpi[k][j];
            hv_i += qRr[c][j] * qpi[k][j] + qRi[c][j] * qpr[k][j];
          end
          check(absr(hv_r - v_r[k][c]) < tol && absr(hv_i - v_i[k][c]) < tol, "v = R p");
          hpg_r += qpr[k][c] * qgr[k][c] + qpi[k][c] * qgi[k][c];
          hpg_i += qpr[k][c] * qgi[k][c] - qpi[k][c] * qgr[k][c];
          hpv_r += qpr[k][c] * hv_r + qpi[k][c] * hv_i;
          hpv_i += qpr[k][c] * hv_i - qpi[k][c] * hv_r;
          hgg   += qgr[k][c] * qgr[k][c] + qgi[k][c] * qgi[k][c];
        end
        check(absr(hpg_r - apg_r[k]) < tol && absr(hpg_i - apg_i[k]) < tol, "p^H g");
        check(absr(hpv_r - apv_r[k]) < 4.0 * tol && absr(hpv_i - apv_i[k]) < 4.0 * tol, "p^H R p");
        check(absr(hgg - agg[k]) < tol, "g^H g");
      end

      // ---- steering vectors
      for (int k = 0; k < N; k++)
        for (int m = 0; m < M; m++) begin
          ar[k][m] = $cos(PI * m * $sin(theta[k]));
          ai[k][m] = $sin(PI * m * $sin(theta[k]));
        end

      // ---- new snapshot x(n) and symbols d_k(n)
      for (int k = 0; k < N; k++) dsym[k] = ($urandom_range(0, 1) == 1) ? 1.0 : -1.0;
      for (int m = 0; m < M; m++) begin
        xr[m] = NOISE * ($itor($urandom_range(0, 2000)) / 1000.0 - 1.0);
        xi[m] = NOISE * ($itor($urandom_range(0, 2000)) / 1000.0 - 1.0);
        for (int k = 0; k < N; k++) begin
          xr[m] += AMP * dsym[k] * ar[k][m];
          xi[m] += AMP * dsym[k] * ai[k][m];
        end
      end

      // ---- MCG step per user, host side
      for (int k = 0; k < N; k++) begin
        if (n == 0) begin
          // g(0) = b(0) = x(0) conj(d(0)), p(0) = g(0), w(0) = 0
          for (int m = 0; m < M; m++) begin
            gr[k][m] = xr[m] * dsym[k]; gi[k][m] = xi[m] * dsym[k];
            pr[k][m] = gr[k][m]; pi_[k][m] = gi[k][m];
          end
          continue;
        end
        den = apv_r[k];
        if (den > 1.0e-6) begin
          alpha_r = ETA * apg_r[k] / den;
          alpha_i = ETA * apg_i[k] / den;
        end else begin
          alpha_r = 0.0; alpha_i = 0.0;
        end
        // e = d - x^H w(n-1)
        yr = 0.0; yi = 0.0;
        for (int m = 0; m < M; m++) begin
          yr += xr[m] * wr[k][m] + xi[m] * wi[k][m];
          yi += xr[m] * wi[k][m] - xi[m] * wr[k][m];
        end
        e_r = dsym[k] - yr; e_i = -yi;
        for (int m = 0; m < M; m++) begin
          goldr[m] = gr[k][m]; goldi[m] = gi[k][m];
          wr[k][m] += alpha_r * qpr[k][m] - alpha_i * qpi[k][m];
          wi[k][m] += alpha_r * qpi[k][m] + alpha_i * qpr[k][m];
          gr[k][m] = LAMBDA * gr[k][m] - (alpha_r * v_r[k][m] - alpha_i * v_i[k][m])
                     + (xr[m] * e_r - xi[m] * e_i);
          gi[k][m] = LAMBDA * gi[k][m] - (alpha_r * v_i[k][m] + alpha_i * v_r[k][m])
                     + (xi[m] * e_r + xr[m] * e_i);
        end
        num = 0.0;
        for (int m = 0; m < M; m++)
          num += (gr[k][m] - goldr[m]) * gr[k][m] + (gi[k][m] - goldi[m]) * gi[k][m];
        beta = (agg[k] > 1.0e-6) ? num / agg[k] : 0.0;
        if (beta < 0.0) begin beta = 0.0; n_beta_reset++; end
        for (int m = 0; m < M; m++) begin
          pr[k][m]  = gr[k][m] + beta * pr[k][m];
          pi_[k][m] = gi[k][m] + beta * pi_[k][m];
        end
      end

      // ---- R(n) = lambda R(n-1) + x x^H
      for (int a = 0; a < M; a++)
        for (int b = 0; b < M; b++) begin
          Rr[a][b] = LAMBDA * Rr[a][b] + xr[a] * xr[b] + xi[a] * xi[b];
          Ri[a][b] = LAMBDA * Ri[a][b] + xi[a] * xr[b] - xr[a] * xi[b];
        end
    end

    // ---- has each weight vector locked on to its user?
    for (int k = 0; k < N; k++) begin
      corr_r = 0.0; corr_i = 0.0; nw = 0.0; na = 0.0;
      for (int m = 0; m < M; m++) begin
        corr_r += wr[k][m] * ar[k][m] + wi[k][m] * ai[k][m];
        corr_i += wr[k][m] * ai[k][m] - wi[k][m] * ar[k][m];
        nw += wr[k][m] * wr[k][m] + wi[k][m] * wi[k][m];
        na += ar[k][m] * ar[k][m] + ai[k][m] * ai[k][m];
      end
      // angle from the mean phase step between neighbouring weights
      ph_r = 0.0; ph_i = 0.0;
      for (int m = 0; m + 1 < M; m++) begin
        ph_r += wr[k][m+1] * wr[k][m] + wi[k][m+1] * wi[k][m];
        ph_i += wi[k][m+1] * wr[k][m] - wr[k][m+1] * wi[k][m];
      end
      th_est = $asin($atan2(ph_i, ph_r) / PI) * 180.0 / PI;
      $display("user %0d: correlation of w with its steering vector %0.4f, angle %0.2f deg (true %0.2f)",
               k, $sqrt((corr_r * corr_r + corr_i * corr_i) / (nw * na + 1.0e-30)),
               th_est, theta[k] * 180.0 / PI);
      check((corr_r * corr_r + corr_i * corr_i) > 0.95 * 0.95 * nw * na, "weight vector locked on");
      check(absr(th_est - theta[k] * 180.0 / PI) < 3.0, "angle estimate within 3 degrees");
    end
    check(n_sat == 0, "no saturation of values sent to the array");
    $display("samples=%0d preloads=%0d beta_resets=%0d saturations=%0d",
             SAMPLES, SAMPLES, n_beta_reset, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
