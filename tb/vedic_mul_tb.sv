// vedic_mul_tb: checks the divide-and-conquer Vedic multiplier against the
// '*' operator: exhaustively at W = 2, 4 and 8 (the default), and with
// random and corner operands at W = 16. Includes the 8-bit example
// 40 * 20 = 800 (00101000 * 00010100 = 0000001100100000).
module vedic_mul_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  logic [1:0]  a2, b2;   logic [3:0]  p2;
  logic [3:0]  a4, b4;   logic [7:0]  p4;
  logic [7:0]  a8, b8;   logic [15:0] p8;
  logic [15:0] a16, b16; logic [31:0] p16;

  vedic_mul #(.W(2))  u2  (.a(a2),  .b(b2),  .p(p2));
  vedic_mul #(.W(4))  u4  (.a(a4),  .b(b4),  .p(p4));
  vedic_mul           u8  (.a(a8),  .b(b8),  .p(p8));
  vedic_mul #(.W(16)) u16 (.a(a16), .b(b16), .p(p16));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string tag, input longint unsigned got,
                     input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", tag, got, exp);
    end
  endtask

  initial begin
    // exhaustive small sizes: one cycle per 256 products of the 8-bit unit
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        a4 = 4'(i); b4 = 4'(j);
        a2 = 2'(i); b2 = 2'(j);
        #1;
        chk("w8", p8, longint'(i * j));
        if (i < 16 && j < 16) chk("w4", p4, longint'(i * j));
        if (i < 4 && j < 4)   chk("w2", p2, longint'(i * j));
      end
      @(posedge clk);
    end
    // printed example
    a8 = 8'b00101000; b8 = 8'b00010100; #1;
    chk("fig 40*20", p8, 16'b0000001100100000);
    // corners and random at 16 bits
    a16 = '1; b16 = '1; #1;
    chk("w16 max", p16, 64'hFFFF * 64'hFFFF);
    for (int n = 0; n < 20000; n++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      #1;
      chk("w16", p16, longint'(a16) * longint'(b16));
      if (n % 64 == 0) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
