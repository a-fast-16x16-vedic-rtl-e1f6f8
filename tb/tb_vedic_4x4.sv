// tb_vedic_4x4: self-check of the 4x4 Vedic multiplier.
// First the operand pairs printed in the reference design's 4x4 simulation waveform
// (5*12=60, 12*9=108, 9*1=9, 1*14=14, 7*10=70) are checked against their
// printed products, then all 256 operand pairs against a*b.
module tb_vedic_4x4;
  logic [3:0] a, b;
  logic [7:0] c;
  int checks = 0, failures = 0;

  vedic_4x4 dut (.a(a), .b(b), .c(c));

  task automatic check(input logic [3:0] x, input logic [3:0] y, input logic [7:0] exp);
    a = x;
    b = y;
    #1;
    checks++;
    if (c !== exp) begin
      failures++;
      $display("FAIL %0d*%0d: got %0d expected %0d", x, y, c, exp);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(4'd5, 4'd12, 8'd60);
    check(4'd12, 4'd9, 8'd108);
    check(4'd9, 4'd1, 8'd9);
    check(4'd1, 4'd14, 8'd14);
    check(4'h7, 4'hA, 8'h46);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        check(4'(i), 4'(j), 8'(i * j));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
