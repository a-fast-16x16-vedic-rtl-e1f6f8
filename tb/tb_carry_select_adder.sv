// tb_carry_select_adder: self-check of the carry select adder at the widths
// the multiplier uses (4, 6, 8, 12, 16 and 24 bits, block size
// floor(sqrt(width))), plus a 10-bit adder with 3-bit blocks whose last block
// is shorter. Each width gets random operands and carry-ins, plus the
// full-propagate cases (all ones + 1) that ripple a carry through every block.
module tb_carry_select_adder;
  int checks = 0, failures = 0;

  logic [23:0] a, b;
  logic        ci;

  logic [3:0]  s4;  logic co4;
  logic [5:0]  s6;  logic co6;
  logic [7:0]  s8;  logic co8;
  logic [11:0] s12; logic co12;
  logic [15:0] s16; logic co16;
  logic [23:0] s24; logic co24;
  logic [9:0]  s10; logic co10;

  carry_select_adder #(.WIDTH(4))  u4  (.a(a[3:0]),  .b(b[3:0]),  .cin(ci), .sum(s4),  .cout(co4));
  carry_select_adder #(.WIDTH(6))  u6  (.a(a[5:0]),  .b(b[5:0]),  .cin(ci), .sum(s6),  .cout(co6));
  carry_select_adder #(.WIDTH(8))  u8  (.a(a[7:0]),  .b(b[7:0]),  .cin(ci), .sum(s8),  .cout(co8));
  carry_select_adder #(.WIDTH(12)) u12 (.a(a[11:0]), .b(b[11:0]), .cin(ci), .sum(s12), .cout(co12));
  carry_select_adder #(.WIDTH(16)) u16 (.a(a[15:0]), .b(b[15:0]), .cin(ci), .sum(s16), .cout(co16));
  carry_select_adder #(.WIDTH(24)) u24 (.a(a),       .b(b),       .cin(ci), .sum(s24), .cout(co24));
  carry_select_adder #(.WIDTH(10), .BLOCK(3)) u10 (.a(a[9:0]), .b(b[9:0]), .cin(ci), .sum(s10), .cout(co10));

  function automatic logic [24:0] ref_add(logic [23:0] x, logic [23:0] y, logic c, int w);
    logic [24:0] m, r;
    m = (25'd1 << w) - 25'd1;
    r = (25'(x) & m) + (25'(y) & m) + 25'(c);
    return r & ((m << 1) | 25'd1);
  endfunction

  task automatic cmp(string name, logic [24:0] got, logic [24:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%h b=%h cin=%0d: got %h expected %h", name, a, b, ci, got, exp);
    end
  endtask

  task automatic apply(logic [23:0] x, logic [23:0] y, logic c);
    a = x; b = y; ci = c;
    #1;
    cmp("w4",  25'({co4, s4}),   ref_add(x, y, c, 4));
    cmp("w6",  25'({co6, s6}),   ref_add(x, y, c, 6));
    cmp("w8",  25'({co8, s8}),   ref_add(x, y, c, 8));
    cmp("w12", 25'({co12, s12}), ref_add(x, y, c, 12));
    cmp("w16", 25'({co16, s16}), ref_add(x, y, c, 16));
    cmp("w24", 25'({co24, s24}), ref_add(x, y, c, 24));
    cmp("w10", 25'({co10, s10}), ref_add(x, y, c, 10));
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(24'hFFFFFF, 24'h000000, 1'b1);
    apply(24'hFFFFFF, 24'h000001, 1'b0);
    apply(24'hFFFFFF, 24'hFFFFFF, 1'b1);
    apply(24'h000000, 24'h000000, 1'b0);
    apply(24'hAAAAAA, 24'h555555, 1'b1);
    for (int n = 0; n < 3000; n++)
      apply(24'($urandom), 24'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
