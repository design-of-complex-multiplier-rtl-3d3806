// vedic_multiplier_tb: the registered 8 x 8 Vedic multiplier. Checks the
// reset value, the one-clock latency (p changes only after the clock edge
// that captures x and y), the example 40 * 20 = 800, and random products.
module vedic_multiplier_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst;
  logic [7:0]  x, y;
  logic [15:0] p;

  vedic_multiplier dut (.clk(clk), .rst(rst), .x(x), .y(y), .p(p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string tag, input logic [15:0] exp);
    checks++;
    if (p !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", tag, p, exp);
    end
  endtask

  logic [15:0] prev;

  initial begin
    rst = 1'b1; x = 8'd200; y = 8'd100;
    repeat (2) @(posedge clk);
    #1 chk("reset", 16'd0);
    @(negedge clk) rst = 1'b0;
    x = 8'b00101000; y = 8'b00010100;           // 40 * 20
    #1 chk("before edge", 16'd0);               // not yet captured
    @(posedge clk); #1 chk("40*20", 16'd800);
    x = 8'd31; y = 8'd65;                       // 2015
    #1 chk("hold", 16'd800);
    @(posedge clk); #1 chk("31*65", 16'd2015);
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      prev = p;
      x = 8'($urandom); y = 8'($urandom);
      #1 chk("latency", prev);
      @(posedge clk); #1 chk("random", 16'(x) * 16'(y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
