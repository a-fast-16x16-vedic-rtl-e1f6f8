// tb_ripple_carry_adder: exhaustive self-check of a 4-bit ripple carry adder
// (all a, b and carry-in, 512 cases) and a random check of a 24-bit one.
module tb_ripple_carry_adder;
  logic [3:0]  a4, b4, s4;
  logic        ci4, co4;
  logic [23:0] a24, b24, s24;
  logic        ci24, co24;
  int checks = 0, failures = 0;

  ripple_carry_adder dut4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4));
  ripple_carry_adder #(.WIDTH(24)) dut24 (.a(a24), .b(b24), .cin(ci24), .sum(s24), .cout(co24));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [24:0] exp24;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int k = 0; k < 2; k++) begin
          a4 = 4'(i); b4 = 4'(j); ci4 = 1'(k);
          #1;
          checks++;
          if ({co4, s4} !== 5'(i + j + k)) begin
            failures++;
            $display("FAIL 4-bit %0d+%0d+%0d: got %0d", i, j, k, {co4, s4});
          end
        end
    for (int n = 0; n < 2000; n++) begin
      a24 = 24'($urandom); b24 = 24'($urandom); ci24 = 1'($urandom);
      #1;
      exp24 = 25'(a24) + 25'(b24) + 25'(ci24);
      checks++;
      if ({co24, s24} !== exp24) begin
        failures++;
        $display("FAIL 24-bit %0d+%0d+%0d: got %0d", a24, b24, ci24, {co24, s24});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
