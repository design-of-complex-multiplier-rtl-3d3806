// fft8_tb: the pipelined 8-point FFT, DIF (default) and DIT side by side.
//
// Each frame is checked twice: bit-exactly against the fixed-point flow
// graph model of fft_ref_pkg, and within a tolerance against the exact DFT
// (with the output order of each form: bit-reversed for DIF, natural for
// DIT, whose input is fed bit-reversed). The test also checks the 3-clock
// latency of a single frame, back-to-back frames at one per clock, gaps in
// in_valid, and that reset clears the pipeline.
module fft8_tb;
  import fft_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst, in_valid;
  logic signed [15:0] xn_re [8], xn_im [8];      // natural order (DIF input)
  logic signed [15:0] xb_re [8], xb_im [8];      // bit-reversed (DIT input)
  logic signed [15:0] yf_re [8], yf_im [8], yt_re [8], yt_im [8];
  logic vf, vt;

  fft8 u_dif (.clk(clk), .rst(rst), .in_valid(in_valid), .x_re(xn_re), .x_im(xn_im),
              .out_valid(vf), .y_re(yf_re), .y_im(yf_im));
  fft8 #(.DIF(1'b0)) u_dit (.clk(clk), .rst(rst), .in_valid(in_valid),
              .x_re(xb_re), .x_im(xb_im), .out_valid(vt), .y_re(yt_re), .y_im(yt_im));

  always_comb
    for (int i = 0; i < 8; i++) begin
      xb_re[i] = xn_re[bitrev3(i)];
      xb_im[i] = xn_im[bitrev3(i)];
    end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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

  // expected-frame queue, filled at the input, consumed at the output
  cvec_t q_re [1024], q_im [1024];
  int sent = 0, received = 0, wr_ptr = 0, rd_ptr = 0;

  // more than 4 LSB away from the exact value
  function automatic bit far(input real got, input real exp);
    return (got - exp > 4.0) || (exp - got > 4.0);
  endfunction

  task automatic check_frame(input cvec_t xr, input cvec_t xi);
    cvec_t er, ei, br, bi;
    real dr [8], di [8];
    // bit-exact
    fft8_ref(1'b1, 16, 10, xr, xi, er, ei);
    for (int i = 0; i < 8; i++) begin
      br[i] = xr[bitrev3(i)]; bi[i] = xi[bitrev3(i)];
    end
    for (int i = 0; i < 8; i++) begin
      chk("dif re", yf_re[i], er[i]); chk("dif im", yf_im[i], ei[i]);
    end
    fft8_ref(1'b0, 16, 10, br, bi, er, ei);
    for (int i = 0; i < 8; i++) begin
      chk("dit re", yt_re[i], er[i]); chk("dit im", yt_im[i], ei[i]);
    end
    // against the exact DFT (inputs are small enough not to wrap)
    dft8(xr, xi, dr, di);
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (far(real'(yf_re[bitrev3(k)]), dr[k]) || far(real'(yf_im[bitrev3(k)]), di[k]) ||
          far(real'(yt_re[k]), dr[k]) || far(real'(yt_im[k]), di[k])) begin
        failures++;
        $display("FAIL dft k=%0d: dif %0d,%0d dit %0d,%0d exact %f,%f", k,
                 yf_re[bitrev3(k)], yf_im[bitrev3(k)], yt_re[k], yt_im[k], dr[k], di[k]);
      end
    end
  endtask

  // output monitor
  always @(posedge clk) begin
    #1;
    checks++;
    if (vf !== vt) begin failures++; $display("FAIL valid mismatch"); end
    if (vf) begin
      if (rd_ptr == wr_ptr) begin
        failures++;
        $display("FAIL unexpected out_valid");
      end else begin
        check_frame(q_re[rd_ptr % 1024], q_im[rd_ptr % 1024]);
        rd_ptr++;
        received++;
      end
    end
  end

  task automatic drive(input bit valid, input int amp);
    cvec_t r, i;
    @(negedge clk);
    in_valid = valid;
    for (int n = 0; n < 8; n++) begin
      r[n] = longint'($urandom_range(2 * amp)) - amp;
      i[n] = longint'($urandom_range(2 * amp)) - amp;
      xn_re[n] = 16'(r[n]); xn_im[n] = 16'(i[n]);
    end
    if (valid) begin
      q_re[wr_ptr % 1024] = r; q_im[wr_ptr % 1024] = i; wr_ptr++; sent++;
    end
  endtask

  initial begin
    rst = 1'b1; in_valid = 1'b0;
    for (int n = 0; n < 8; n++) begin xn_re[n] = '0; xn_im[n] = '0; end
    repeat (3) @(posedge clk);
    #1 checks++;
    if (vf || vt || yf_re[0] != 0) begin failures++; $display("FAIL reset"); end
    @(negedge clk) rst = 1'b0;

    // one frame: x(n) = (n+1)(1+j), latency must be exactly 3 clocks
    in_valid = 1'b1;
    for (int n = 0; n < 8; n++) begin xn_re[n] = 16'(n + 1); xn_im[n] = 16'(n + 1); end
    begin
      cvec_t r, i;
      for (int n = 0; n < 8; n++) begin r[n] = n + 1; i[n] = n + 1; end
      q_re[wr_ptr % 1024] = r; q_im[wr_ptr % 1024] = i; wr_ptr++; sent++;
    end
    @(negedge clk) in_valid = 1'b0;
    for (int c = 1; c <= 4; c++) begin
      checks++;
      if (vf !== (c == 3)) begin
        failures++; $display("FAIL latency: out_valid=%0d at clock %0d", vf, c);
      end
      @(negedge clk);
    end

    // back-to-back frames, then frames with gaps
    repeat (200) drive(1'b1, 2800);
    repeat (200) drive($urandom_range(1), 2800);
    repeat (50)  drive(1'b1, 20);

    // reset with frames in flight: nothing may come out
    repeat (2) drive(1'b1, 100);
    @(negedge clk) in_valid = 1'b0; rst = 1'b1;
    rd_ptr = wr_ptr;
    @(negedge clk) rst = 1'b0;
    repeat (5) @(negedge clk);

    repeat (4) @(negedge clk);
    checks++;
    if (rd_ptr != wr_ptr) begin failures++; $display("FAIL %0d frames missing", wr_ptr - rd_ptr); end
    $display("frames sent %0d, checked %0d", sent, received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
