// vedic_mul2_tb: exhaustive check of the 2x2 Urdhva cell against a*b.
module vedic_mul2_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [1:0] a, b;
  logic [3:0] p;

  vedic_mul2 dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i); b = 2'(j);
        @(posedge clk);
        checks++;
        if (p != 4'(i * j)) begin
          failures++;
          $display("FAIL %0d*%0d: got %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
