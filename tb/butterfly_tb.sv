// butterfly_tb: the DIF (default) and DIT butterflies against the reference
// butterfly of fft_ref_pkg, with every W8^k twiddle, corner samples that
// make the sums wrap, and random samples.
module butterfly_tb;
  import fft_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  logic signed [15:0] ar, ai, br, bi;
  logic signed [11:0] wr, wi;
  logic signed [15:0] f0r, f0i, f1r, f1i;   // DIF
  logic signed [15:0] t0r, t0i, t1r, t1i;   // DIT

  butterfly u_dif (.a_re(ar), .a_im(ai), .b_re(br), .b_im(bi), .w_re(wr), .w_im(wi),
                   .y0_re(f0r), .y0_im(f0i), .y1_re(f1r), .y1_im(f1i));
  butterfly #(.DIF(1'b0)) u_dit (.a_re(ar), .a_im(ai), .b_re(br), .b_im(bi),
                   .w_re(wr), .w_im(wi),
                   .y0_re(t0r), .y0_im(t0i), .y1_re(t1r), .y1_im(t1i));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string tag, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", tag, got, exp);
    end
  endtask

  task automatic run(input longint a_r, input longint a_i, input longint b_r,
                     input longint b_i, input int k);
    longint w_r, w_i, e0r, e0i, e1r, e1i;
    twiddle(k, 10, w_r, w_i);
    ar = 16'(a_r); ai = 16'(a_i); br = 16'(b_r); bi = 16'(b_i);
    wr = 12'(w_r); wi = 12'(w_i);
    #1;
    bf_ref(1'b1, 16, 10, ar, ai, br, bi, w_r, w_i, e0r, e0i, e1r, e1i);
    chk("dif y0r", f0r, e0r); chk("dif y0i", f0i, e0i);
    chk("dif y1r", f1r, e1r); chk("dif y1i", f1i, e1i);
    bf_ref(1'b0, 16, 10, ar, ai, br, bi, w_r, w_i, e0r, e0i, e1r, e1i);
    chk("dit y0r", t0r, e0r); chk("dit y0i", t0i, e0i);
    chk("dit y1r", t1r, e1r); chk("dit y1i", t1i, e1i);
  endtask

  initial begin
    // hand-worked cases: a = 1+2j, b = 3+4j
    ar = 16'sd1; ai = 16'sd2; br = 16'sd3; bi = 16'sd4;
    wr = 12'sd0; wi = -12'sd1024;                    // W8^2 = -j
    #1;
    chk("dif A re", f0r, 4);  chk("dif A im", f0i, 6);   // a + b
    chk("dif B re", f1r, -2); chk("dif B im", f1i, 2);   // (a-b)(-j) = (-2-2j)(-j)
    chk("dit A re", t0r, 5);  chk("dit A im", t0i, -1);  // a + (4-3j)
    chk("dit B re", t1r, -3); chk("dit B im", t1i, 5);   // a - (4-3j)
    for (int k = 0; k < 4; k++) begin
      run(32767, -32768, -32768, 32767, k);
      run(1000, -1000, 1000, 1000, k);
    end
    for (int n = 0; n < 20000; n++) begin
      run(longint'(16'($urandom)), longint'(16'($urandom)),
          longint'(16'($urandom)), longint'(16'($urandom)), n % 4);
      if (n % 64 == 0) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
