// Self-checking testbench for pe2, the modified linear-array cell. Random
// p, g, v and incoming running sums are driven; one cycle later the
// outgoing sums must equal the incoming ones plus (conj(p) g) >>> 12,
// (conj(p) v) >>> 12 and |g|^2 >>> 12, computed here with the four-
// multiplication formula, and the extra port must show v with its valid
// flag.
module tb_pe2;
  import mts_pkg::*;

  int checks = 0;
  int failures = 0;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   v_valid_in = 1'b0;
  cacc_t  v_in, pg_in, pv_in, pg_out, pv_out, v_out;
  cdata_t p_in, g_in;
  aword_t gg_in, gg_out;
  logic   valid_out;

  always #5 clk = ~clk;

  pe2 dut (.*);

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cdata_t p, g;
    cacc_t  v, pgi, pvi;
    aword_t ggi;
    logic   val;
    longint pr, pi, gr, gi, vr, vi;
    v_in = '0; pg_in = '0; pv_in = '0; gg_in = '0; p_in = '0; g_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (1000) begin
      p = cdata_t'($urandom); g = cdata_t'($urandom);
      v.re   = aword_t'($signed($urandom) >>> 8);
      v.im   = aword_t'($signed($urandom) >>> 8);
      pgi.re = aword_t'($signed($urandom) >>> 4);
      pgi.im = aword_t'($signed($urandom) >>> 4);
      pvi.re = aword_t'($signed($urandom) >>> 4);
      pvi.im = aword_t'($signed($urandom) >>> 4);
      ggi    = aword_t'($urandom >> 4);
      val    = 1'($urandom);
      p_in = p; g_in = g; v_in = v; pg_in = pgi; pv_in = pvi; gg_in = ggi;
      v_valid_in = val;
      @(negedge clk);
      pr = p.re; pi = p.im; gr = g.re; gi = g.im; vr = v.re; vi = v.im;
      check(pg_out.re, aword_t'(longint'(pgi.re) + ((pr*gr + pi*gi) >>> FRAC)), "pg.re");
      check(pg_out.im, aword_t'(longint'(pgi.im) + ((pr*gi - pi*gr) >>> FRAC)), "pg.im");
      check(pv_out.re, aword_t'(longint'(pvi.re) + ((pr*vr + pi*vi) >>> FRAC)), "pv.re");
      check(pv_out.im, aword_t'(longint'(pvi.im) + ((pr*vi - pi*vr) >>> FRAC)), "pv.im");
      check(gg_out,    aword_t'(longint'(ggi)    + ((gr*gr + gi*gi) >>> FRAC)), "gg");
      check(v_out, v, "v port");
      check(valid_out, val, "valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
