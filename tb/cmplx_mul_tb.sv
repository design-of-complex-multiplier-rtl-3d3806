// cmplx_mul_tb: (a+jb)(c+jd) against (ac-bd) + j(ad+bc) computed with
// integers, at W = 8 (default) and W = 16, with corner and random operands.
module cmplx_mul_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic signed [7:0]  a8, b8, c8, d8;     logic signed [16:0] re8, im8;
  logic signed [15:0] a16, b16, c16, d16; logic signed [32:0] re16, im16;

  cmplx_mul           u8  (.a(a8), .b(b8), .c(c8), .d(d8), .re(re8), .im(im8));
  cmplx_mul #(.W(16)) u16 (.a(a16), .b(b16), .c(c16), .d(d16), .re(re16), .im(im16));

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

  task automatic run8(input int a, input int b, input int c, input int d);
    a8 = 8'(a); b8 = 8'(b); c8 = 8'(c); d8 = 8'(d); #1;
    chk("re8", re8, longint'(int'(a8) * int'(c8) - int'(b8) * int'(d8)));
    chk("im8", im8, longint'(int'(a8) * int'(d8) + int'(b8) * int'(c8)));
  endtask

  task automatic run16(input longint a, input longint b, input longint c, input longint d);
    a16 = 16'(a); b16 = 16'(b); c16 = 16'(c); d16 = 16'(d); #1;
    chk("re16", re16, longint'(a16) * c16 - longint'(b16) * d16);
    chk("im16", im16, longint'(a16) * d16 + longint'(b16) * c16);
  endtask

  initial begin
    run8(3, 4, 5, 6);                        // -9 + j38
    run8(-128, -128, -128, 127);             // largest |re|
    run8(-128, -128, -128, -128);            // largest |im|: 32768
    run8(127, -128, 127, -128);
    run16(-32768, -32768, -32768, -32768);
    run16(-32768, 32767, 32767, -32768);
    for (int n = 0; n < 20000; n++) begin
      run8($urandom, $urandom, $urandom, $urandom);
      run16(longint'($urandom), longint'($urandom), longint'($urandom), longint'($urandom));
      if (n % 64 == 0) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
