// Self-checking testbench for cmul_sr, the three-multiplier complex
// multiplier. Three instances cover a * b, conj(a) * b and the wide-b
// variant used for p^H v. Each output is compared with the textbook
// four-multiplication complex product computed in 64-bit integers; corner
// values (the most negative word, zero, all ones) are tried before random
// inputs.
module tb_cmul_sr;

  int checks = 0;
  int failures = 0;

  logic signed [15:0] a_re, a_im, b_re, b_im;
  logic signed [31:0] bw_re, bw_im;
  logic signed [35:0] y0_re, y0_im, y1_re, y1_im;
  logic signed [51:0] y2_re, y2_im;

  cmul_sr #(.WA(16), .WB(16), .CONJ_A(1'b0)) u_plain (
    .a_re, .a_im, .b_re, .b_im, .y_re(y0_re), .y_im(y0_im));
  cmul_sr #(.WA(16), .WB(16), .CONJ_A(1'b1)) u_conj (
    .a_re, .a_im, .b_re, .b_im, .y_re(y1_re), .y_im(y1_im));
  cmul_sr #(.WA(16), .WB(32), .CONJ_A(1'b1)) u_wide (
    .a_re, .a_im, .b_re(bw_re), .b_im(bw_im), .y_re(y2_re), .y_im(y2_im));

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (a=%0d,%0d b=%0d,%0d bw=%0d,%0d)",
               what, got, exp, a_re, a_im, b_re, b_im, bw_re, bw_im);
    end
  endtask

  task automatic apply_and_check();
    longint ar, ai, br, bi, wr, wi;
    #1;
    ar = a_re; ai = a_im; br = b_re; bi = b_im; wr = bw_re; wi = bw_im;
    check(y0_re, ar*br - ai*bi, "a*b re");
    check(y0_im, ar*bi + ai*br, "a*b im");
    check(y1_re, ar*br + ai*bi, "conj(a)*b re");
    check(y1_im, ar*bi - ai*br, "conj(a)*b im");
    check(y2_re, ar*wr + ai*wi, "conj(a)*bw re");
    check(y2_im, ar*wi - ai*wr, "conj(a)*bw im");
  endtask

  localparam logic signed [15:0] CORNER [5] = '{16'sh8000, 16'sh7fff, 16'sh0000, 16'shffff, 16'sh0001};

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (CORNER[i]) foreach (CORNER[j]) begin
      a_re = CORNER[i]; a_im = CORNER[j];
      b_re = CORNER[j]; b_im = CORNER[i];
      bw_re = {{16{CORNER[i][15]}}, CORNER[i]} <<< 15;
      bw_im = 32'sh8000_0000 >>> j;
      apply_and_check();
    end
    repeat (2000) begin
      a_re = 16'($urandom); a_im = 16'($urandom);
      b_re = 16'($urandom); b_im = 16'($urandom);
      bw_re = 32'($urandom); bw_im = 32'($urandom);
      apply_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
