// vedic_smul_tb: the signed wrapper around the Vedic core, exhaustively at
// W = 8 (default) and randomly, with corners, at W = 16.
module vedic_smul_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic signed [7:0]  a8, b8;   logic signed [15:0] p8;
  logic signed [15:0] a16, b16; logic signed [31:0] p16;

  vedic_smul           u8  (.a(a8),  .b(b8),  .p(p8));
  vedic_smul #(.W(16)) u16 (.a(a16), .b(b16), .p(p16));

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

  int corner [6] = '{-32768, -32767, -1, 0, 1, 32767};

  initial begin
    for (int i = -128; i < 128; i++) begin
      for (int j = -128; j < 128; j++) begin
        a8 = 8'(i); b8 = 8'(j); #1;
        chk("w8", p8, longint'(i * j));
      end
      @(posedge clk);
    end
    foreach (corner[i]) foreach (corner[j]) begin
      a16 = 16'(corner[i]); b16 = 16'(corner[j]); #1;
      chk("w16 corner", p16, longint'(corner[i]) * longint'(corner[j]));
    end
    for (int n = 0; n < 20000; n++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); #1;
      chk("w16", p16, longint'(a16) * longint'(b16));
      if (n % 64 == 0) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
