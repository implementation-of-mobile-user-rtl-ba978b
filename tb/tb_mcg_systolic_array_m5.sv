// End-to-end testbench for mcg_systolic_array at M = 5 antennas, a size
// that is not a power of two; otherwise the same as tb_mcg_systolic_array.
//
// A Hermitian R is preloaded, then search directions p and residuals g
// are streamed through. For every vector pair the testbench computes
// v = R p, p^H g, p^H v and g^H g itself (four-multiplication complex
// products, each truncated to 12 fraction bits as the cells do) and
// compares all outputs. It checks the timing as well: a result appears
// 2M cycles after its vectors, and the first result after a preload
// 3M cycles after the first load step.
//
// Mechanisms that must each happen at least once (counted, and a failure
// if never seen): the M-step preload, a single operation taking 3M steps,
// back-to-back vectors sharing one R (the N sources), a stream with gaps,
// a reload of R after the array has drained, and the busy / r_ready flags.
module tb_mcg_systolic_array_m5;
  import mts_pkg::*;

  localparam int unsigned M = 5;

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

  mcg_systolic_array #(.M(M)) dut (.*);

  typedef struct {
    longint issue;
    longint v_re[M];
    longint v_im[M];
    longint pg_re, pg_im, pv_re, pv_im, gg;
  } expect_t;

  expect_t exp_q[$];
  cdata_t  R[M][M];
  longint  cyc = 0;
  longint  t_load0 = -1;
  bit      first_after_load = 1'b0;

  int n_preload = 0, n_single_3m = 0, n_back_to_back = 0, n_gapped = 0;
  int n_reload = 0, n_busy_seen = 0, n_results = 0;

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, exp, cyc);
    end
  endtask

  // reference model, written from the definitions of the products
  function automatic expect_t model(input cdata_t p[M], input cdata_t g[M]);
    expect_t e;
    longint pr, pi, rr, ri, gr, gi;
    e.pg_re = 0; e.pg_im = 0; e.pv_re = 0; e.pv_im = 0; e.gg = 0;
    for (int c = 0; c < M; c++) begin
      e.v_re[c] = 0; e.v_im[c] = 0;
      for (int k = 0; k < M; k++) begin
        pr = p[k].re; pi = p[k].im; rr = R[c][k].re; ri = R[c][k].im;
        e.v_re[c] += (rr*pr - ri*pi) >>> FRAC;
        e.v_im[c] += (rr*pi + ri*pr) >>> FRAC;
      end
    end
    for (int c = 0; c < M; c++) begin
      pr = p[c].re; pi = p[c].im; gr = g[c].re; gi = g[c].im;
      e.pg_re += (pr*gr + pi*gi) >>> FRAC;
      e.pg_im += (pr*gi - pi*gr) >>> FRAC;
      e.pv_re += (pr*e.v_re[c] + pi*e.v_im[c]) >>> FRAC;
      e.pv_im += (pr*e.v_im[c] - pi*e.v_re[c]) >>> FRAC;
      e.gg    += (gr*gr + gi*gi) >>> FRAC;
    end
    return e;
  endfunction

  // monitor: stamps issue cycles and checks every result
  always @(posedge clk) begin
    if (rst_n) begin
      if (r_load && t_load0 < 0) t_load0 = cyc;
      if (busy) n_busy_seen++;
      if (out_valid) begin
        expect_t e;
        if (exp_q.size() == 0) begin
          checks++; failures++;
          $display("FAIL unexpected result at cycle %0d", cyc);
        end else begin
          e = exp_q.pop_front();
          n_results++;
          check(cyc - e.issue, 2 * M, "latency of one vector pair");
          if (first_after_load) begin
            check(cyc - t_load0, 3 * M, "preload plus compute steps");
            if (cyc - t_load0 == 3 * M) n_single_3m++;
            first_after_load = 1'b0;
          end
          check(pg.re, aword_t'(e.pg_re), "pg.re");
          check(pg.im, aword_t'(e.pg_im), "pg.im");
          check(pv.re, aword_t'(e.pv_re), "pv.re");
          check(pv.im, aword_t'(e.pv_im), "pv.im");
          check(gg,    aword_t'(e.gg),    "gg");
          for (int c = 0; c < M; c++) begin
            check(v_vec[c].re, aword_t'(e.v_re[c]), $sformatf("v[%0d].re", c));
            check(v_vec[c].im, aword_t'(e.v_im[c]), $sformatf("v[%0d].im", c));
          end
        end
      end
    end
    cyc <= cyc + 1;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic random_hermitian();
    for (int a = 0; a < M; a++) begin
      R[a][a].re = dword_t'($urandom);
      R[a][a].im = '0;
      for (int b = a + 1; b < M; b++) begin
        R[a][b].re = dword_t'($urandom);
        R[a][b].im = dword_t'($urandom);
        R[b][a].re = R[a][b].re;
        R[b][a].im = -R[a][b].im;
      end
    end
  endtask

  // M load steps; at step t the grid gets column M-1-t of R
  task automatic preload();
    random_hermitian();
    t_load0 = -1;
    for (int t = 0; t < M; t++) begin
      r_load = 1'b1;
      for (int c = 0; c < M; c++) r_row[c] = R[c][M-1-t];
      @(negedge clk);
      if (t < M - 1) begin
        checks++;
        if (r_ready) begin failures++; $display("FAIL r_ready during preload"); end
      end
    end
    r_load = 1'b0;
    r_row  = '0;
    first_after_load = 1'b1;
    #1;
    checks++;
    if (!r_ready) begin failures++; $display("FAIL r_ready not set after preload"); end
    else n_preload++;
  endtask

  // present one random vector pair in this cycle
  task automatic issue();
    cdata_t p[M], g[M];
    expect_t e;
    for (int c = 0; c < M; c++) begin
      p[c] = cdata_t'($urandom);
      g[c] = cdata_t'($urandom);
      p_vec[c] = p[c];
      g_vec[c] = g[c];
    end
    e = model(p, g);
    e.issue = cyc;
    exp_q.push_back(e);
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    p_vec = '0;
    g_vec = '0;
  endtask

  task automatic drain();
    int guard = 0;
    while ((busy || exp_q.size() != 0) && guard < 1000) begin
      @(negedge clk);
      guard++;
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL results missing"); end
  endtask

  initial begin
    r_row = '0; p_vec = '0; g_vec = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (r_ready || busy) begin failures++; $display("FAIL flags after reset"); end

    // one complete operation: preload, then a single vector pair
    preload();
    issue();
    drain();

    // N = 5 sources sharing R, back to back, one per cycle
    for (int s = 0; s < 5; s++) issue();
    n_back_to_back++;
    drain();

    // reload R and stream with random gaps
    n_reload++;
    preload();
    for (int s = 0; s < 20; s++) begin
      if ($urandom_range(0, 1) == 0) @(negedge clk);
      issue();
    end
    n_gapped++;
    drain();

    // a few more reloads with bursts
    for (int rep = 0; rep < 5; rep++) begin
      n_reload++;
      preload();
      for (int s = 0; s < 1 + rep; s++) issue();
      drain();
    end

    checks++; if (n_preload      == 0) begin failures++; $display("FAIL no preload"); end
    checks++; if (n_single_3m    == 0) begin failures++; $display("FAIL no 3M operation"); end
    checks++; if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back stream"); end
    checks++; if (n_gapped       == 0) begin failures++; $display("FAIL no gapped stream"); end
    checks++; if (n_reload       == 0) begin failures++; $display("FAIL no reload"); end
    checks++; if (n_busy_seen    == 0) begin failures++; $display("FAIL busy never seen"); end
    checks++; if (n_results != 1 + 5 + 20 + 15) begin
      failures++; $display("FAIL %0d results", n_results);
    end
    $display("mechanisms: preloads=%0d ops_in_3M=%0d back_to_back=%0d gapped=%0d reloads=%0d busy_cycles=%0d results=%0d",
             n_preload, n_single_3m, n_back_to_back, n_gapped, n_reload, n_busy_seen, n_results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
