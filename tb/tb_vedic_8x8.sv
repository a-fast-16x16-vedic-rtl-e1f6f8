// tb_vedic_8x8: self-check of the 8x8 Vedic multiplier.
// The operand pairs printed in the reference design's 8x8 simulation waveform
// (1*200, 2*145, 3*29, 4*234, 5*115) are checked against their printed
// products, then all 65536 operand pairs against a*b.
module tb_vedic_8x8;
  logic [7:0]  a, b;
  logic [15:0] c;
  int checks = 0, failures = 0;

  vedic_8x8 dut (.a(a), .b(b), .c(c));

  task automatic check(input logic [7:0] x, input logic [7:0] y, input logic [15:0] exp);
    a = x;
    b = y;
    #1;
    checks++;
    if (c !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %0d*%0d: got %0d expected %0d", x, y, c, exp);
    end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(8'd1, 8'd200, 16'd200);
    check(8'd2, 8'd145, 16'd290);
    check(8'd3, 8'd29, 16'd87);
    check(8'd4, 8'd234, 16'd936);
    check(8'd5, 8'd115, 16'd575);
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        check(8'(i), 8'(j), 16'(i * j));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
