// Self-checking testbench for pe1, the grid cell. It preloads r through
// the load path, then drives random p and partial sums and checks one
// cycle later that p and its valid flag moved on unchanged and that
// v_out = v_in + (p * r) >>> 12, with the product formed by the four-
// multiplication formula. It also checks that r holds while load is low
// and that a new load replaces it.
module tb_pe1;
  import mts_pkg::*;

  int checks = 0;
  int failures = 0;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   load = 1'b0;
  cdata_t r_in, r_out, p_in, p_out;
  logic   p_valid_in = 1'b0, p_valid_out;
  cacc_t  v_in, v_out;

  always #5 clk = ~clk;

  pe1 dut (.*);

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
    cdata_t r_cur, p_d;
    cacc_t  v_d;
    logic   val_d;
    longint pr, pi, rr, ri;
    r_in = '0; p_in = '0; v_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 4; round++) begin
      // preload a new r
      r_cur = cdata_t'($urandom);
      @(negedge clk);
      r_in = r_cur; load = 1'b1;
      @(negedge clk);
      load = 1'b0; r_in = cdata_t'($urandom);  // must be ignored
      check(r_out, r_cur, "r_out after load");
      repeat (200) begin
        p_d   = cdata_t'($urandom);
        val_d = 1'($urandom);
        v_d.re = aword_t'($signed($urandom) >>> 4);
        v_d.im = aword_t'($signed($urandom) >>> 4);
        p_in = p_d; p_valid_in = val_d; v_in = v_d;
        r_in = cdata_t'($urandom);
        @(negedge clk);
        pr = p_d.re; pi = p_d.im; rr = r_cur.re; ri = r_cur.im;
        check(p_out, p_d, "p_out");
        check(p_valid_out, val_d, "p_valid_out");
        check(v_out.re, aword_t'(longint'(v_d.re) + ((pr*rr - pi*ri) >>> FRAC)), "v_out.re");
        check(v_out.im, aword_t'(longint'(v_d.im) + ((pr*ri + pi*rr) >>> FRAC)), "v_out.im");
        check(r_out, r_cur, "r held");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
