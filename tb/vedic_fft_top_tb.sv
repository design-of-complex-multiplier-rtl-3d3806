// vedic_fft_top_tb: end-to-end test of the whole design at its default
// parameters (16-bit samples, Q10 twiddles, DIF FFT, 8-bit stand-alone
// multipliers).
//
// FFT: the frame x(n) = (n+1)(1+j) is sent first; its outputs, read as
// 32-bit words {re, im}, must give 2359332, -196612, -524288 and 65528 on
// the first four lines (X0 = 36+36j, X4 = -4-4j, X2 = -8, X6 = -8j) and the
// rest must match the fixed-point model. Then random frames are streamed
// back to back, with gaps, and through a reset. Every frame is checked
// bit-exactly against fft_ref_pkg and within 4 LSB of the exact DFT.
// Stand-alone units: the registered Vedic multiplier with 40 * 20 = 800 and
// random operands (one-clock latency), and the complex multiplier with
// random signed operands.
// Each mechanism (full pipeline, gaps, reset flush, signed products, the
// multiplier latency) is counted; one that never happened is a failure.
module vedic_fft_top_tb;
  import fft_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst, in_valid, out_valid;
  logic signed [15:0] x_re [8], x_im [8], y_re [8], y_im [8];
  logic [7:0]  mul_x, mul_y;
  logic [15:0] mul_p;
  logic signed [7:0]  cm_a, cm_b, cm_c, cm_d;
  logic signed [16:0] cm_re, cm_im;

  vedic_fft_top dut (
    .clk(clk), .rst(rst),
    .fft_in_valid(in_valid), .fft_x_re(x_re), .fft_x_im(x_im),
    .fft_out_valid(out_valid), .fft_y_re(y_re), .fft_y_im(y_im),
    .mul_x(mul_x), .mul_y(mul_y), .mul_p(mul_p),
    .cm_a(cm_a), .cm_b(cm_b), .cm_c(cm_c), .cm_d(cm_d), .cm_re(cm_re), .cm_im(cm_im)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  function automatic bit far(input real got, input real exp);
    return (got - exp > 4.0) || (exp - got > 4.0);
  endfunction

  // mechanism counters
  int n_full = 0, n_gap = 0, n_flush = 0, n_neg = 0, n_mul_lat = 0, n_fig = 0;

  // ---------------------------------------------------------------- FFT
  cvec_t q_re [256], q_im [256];
  int wr_ptr = 0, rd_ptr = 0, frames = 0;
  logic [2:0] vhist = '0;   // in_valid of the last three clocks

  always @(posedge clk) begin
    vhist <= {vhist[1:0], in_valid & ~rst};
    if (vhist == 3'b111 && in_valid && !rst) n_full++;   // 3 in flight + 1 entering
  end

  task automatic check_frame(input cvec_t xr, input cvec_t xi);
    cvec_t er, ei;
    real dr [8], di [8];
    fft8_ref(1'b1, 16, 10, xr, xi, er, ei);
    for (int i = 0; i < 8; i++) begin
      chk("fft re", y_re[i], er[i]);
      chk("fft im", y_im[i], ei[i]);
    end
    dft8(xr, xi, dr, di);
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (far(real'(y_re[bitrev3(k)]), dr[k]) || far(real'(y_im[bitrev3(k)]), di[k])) begin
        failures++;
        $display("FAIL dft k=%0d: got %0d,%0d exact %f,%f", k,
                 y_re[bitrev3(k)], y_im[bitrev3(k)], dr[k], di[k]);
      end
    end
  endtask

  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      checks++;
      if (rd_ptr == wr_ptr) begin
        failures++;
        $display("FAIL unexpected out_valid");
      end else begin
        check_frame(q_re[rd_ptr % 256], q_im[rd_ptr % 256]);
        rd_ptr++;
      end
    end
  end

  task automatic send(input cvec_t r, input cvec_t i);
    @(negedge clk);
    in_valid = 1'b1;
    for (int n = 0; n < 8; n++) begin x_re[n] = 16'(r[n]); x_im[n] = 16'(i[n]); end
    q_re[wr_ptr % 256] = r; q_im[wr_ptr % 256] = i; wr_ptr++; frames++;
  endtask

  task automatic send_random(input int amp);
    cvec_t r, i;
    for (int n = 0; n < 8; n++) begin
      r[n] = longint'($urandom_range(2 * amp)) - amp;
      i[n] = longint'($urandom_range(2 * amp)) - amp;
    end
    send(r, i);
  endtask

  task automatic idle();
    @(negedge clk) in_valid = 1'b0;
  endtask

  // printed result words for the first four lines
  int fig_word [4] = '{2359332, -196612, -524288, 65528};

  initial begin : fft_stim
    cvec_t r, i;
    rst = 1'b1; in_valid = 1'b0;
    for (int n = 0; n < 8; n++) begin x_re[n] = '0; x_im[n] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // reference frame, alone in the pipeline; latency exactly 3
    for (int n = 0; n < 8; n++) begin r[n] = n + 1; i[n] = n + 1; end
    send(r, i);
    idle();
    repeat (2) @(posedge clk);
    #2 checks++;
    if (!out_valid) begin failures++; $display("FAIL latency: no out_valid after 3 clocks"); end
    else begin
      for (int k = 0; k < 4; k++) chk("printed word", int'({y_re[k], y_im[k]}), fig_word[k]);
      n_fig++;
    end
    repeat (3) idle();

    // streaming: back to back, then with gaps
    repeat (40) send_random(2800);
    for (int f = 0; f < 40; f++) begin
      send_random(2800);
      if (f % 3 == 0) begin idle(); n_gap++; end
    end
    // reset with three frames in flight: none may appear
    repeat (3) send_random(500);
    @(negedge clk) in_valid = 1'b0; rst = 1'b1;
    rd_ptr = wr_ptr;
    @(negedge clk) rst = 1'b0;
    n_flush++;
    repeat (6) begin
      @(posedge clk) #2 checks++;
      if (out_valid) begin failures++; $display("FAIL out_valid after reset"); end
    end
    repeat (10) send_random(2800);
    repeat (5) idle();
    checks++;
    if (rd_ptr != wr_ptr) begin failures++; $display("FAIL %0d frames missing", wr_ptr - rd_ptr); end
    -> fft_done;
  end

  event fft_done;

  // ------------------------------------------------- stand-alone units
  initial begin : mul_stim
    logic [15:0] prev;
    mul_x = 8'b00101000; mul_y = 8'b00010100;           // 40 * 20
    cm_a = '0; cm_b = '0; cm_c = '0; cm_d = '0;
    @(negedge rst);
    @(posedge clk) #1 chk("vedic 40*20", mul_p, 16'b0000001100100000);
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      prev = mul_p;
      mul_x = 8'($urandom); mul_y = 8'($urandom);
      cm_a = 8'($urandom); cm_b = 8'($urandom); cm_c = 8'($urandom); cm_d = 8'($urandom);
      #1;
      chk("cm re", cm_re, int'(cm_a) * int'(cm_c) - int'(cm_b) * int'(cm_d));
      chk("cm im", cm_im, int'(cm_a) * int'(cm_d) + int'(cm_b) * int'(cm_c));
      if ((cm_a < 0) != (cm_c < 0) && cm_a != 0 && cm_c != 0) n_neg++;
      chk("mul hold", mul_p, prev);
      // the shared reset (used by the FFT flush test) clears the registers
      @(posedge clk) #1 chk("mul", mul_p, rst ? 16'd0 : 16'(mul_x) * 16'(mul_y));
      n_mul_lat++;
    end
  end

  initial begin : finish
    @(fft_done);
    $display("frames %0d, full pipeline %0d, gaps %0d, reset flushes %0d, printed frame %0d",
             frames, n_full, n_gap, n_flush, n_fig);
    $display("signed complex products %0d, multiplier latency checks %0d", n_neg, n_mul_lat);
    if (n_full == 0)    begin failures++; $display("FAIL pipeline never full"); end
    if (n_gap == 0)     begin failures++; $display("FAIL no gap"); end
    if (n_flush == 0)   begin failures++; $display("FAIL no reset flush"); end
    if (n_fig == 0)     begin failures++; $display("FAIL printed frame not checked"); end
    if (n_neg == 0)     begin failures++; $display("FAIL no negative product"); end
    if (n_mul_lat == 0) begin failures++; $display("FAIL multiplier not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
