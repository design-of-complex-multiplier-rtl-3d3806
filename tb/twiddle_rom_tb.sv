// twiddle_rom_tb: the twiddle table against round(cos), -round(sin) of
// 2*pi*k/8 scaled by 2^frac, at the default Q10 (1024, 724) and at Q14.
module twiddle_rom_tb;
  import fft_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [1:0] k;
  logic signed [11:0] wr, wi;
  logic signed [15:0] wr16, wi16;

  twiddle_rom                            u_q10 (.k(k), .w_re(wr),   .w_im(wi));
  twiddle_rom #(.TW(16), .TW_FRAC(14))   u_q14 (.k(k), .w_re(wr16), .w_im(wi16));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string tag, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s k=%0d: got %0d expected %0d", tag, k, got, exp);
    end
  endtask

  longint er, ei;
  int exp_q10_re [4] = '{1024, 724, 0, -724};
  int exp_q10_im [4] = '{0, -724, -1024, -724};

  initial begin
    for (int i = 0; i < 4; i++) begin
      k = 2'(i);
      @(posedge clk);
      twiddle(i, 10, er, ei);
      chk("q10 re", wr, er);
      chk("q10 im", wi, ei);
      chk("q10 re const", wr, exp_q10_re[i]);
      chk("q10 im const", wi, exp_q10_im[i]);
      twiddle(i, 14, er, ei);
      chk("q14 re", wr16, er);
      chk("q14 im", wi16, ei);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
