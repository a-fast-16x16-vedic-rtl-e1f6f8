// tb_csa_block: exhaustive self-check of the 4-bit carry select block (all
// a, b and carry-in, 512 cases). It also counts how often the block carried
// out through its carry-in-1 path, and requires that both multiplexer
// settings were exercised.
module tb_csa_block;
  logic [3:0] a, b, s;
  logic       ci, co;
  int checks = 0, failures = 0;
  int sel1_carry = 0; // cases where carry-in 1 changed the carry-out

  csa_block dut (.a(a), .b(b), .cin(ci), .sum(s), .cout(co));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int k = 0; k < 2; k++) begin
          a = 4'(i); b = 4'(j); ci = 1'(k);
          #1;
          checks++;
          if ({co, s} !== 5'(i + j + k)) begin
            failures++;
            $display("FAIL %0d+%0d+%0d: got %0d", i, j, k, {co, s});
          end
          if (k == 1 && i + j == 15) sel1_carry++;
        end
    checks++;
    if (sel1_carry == 0) begin
      failures++;
      $display("FAIL carry-in 1 never propagated through the block");
    end
    $display("carry-in-1 propagated through the block in %0d cases", sel1_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
