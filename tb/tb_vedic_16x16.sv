// tb_vedic_16x16: end-to-end self-check of the 16x16 Vedic multiplier with
// carry select adders, at its only (default) size.
//
// Applied in order:
//  * the operand pairs printed in the reference design's 16x16 simulation waveform,
//    against their printed products (e.g. 24359*51263 = 1248715417);
//  * corner operands (0, 1, all ones, single bits, alternating patterns) in
//    every combination;
//  * NRAND random operand pairs.
// Every product is compared with a*b computed by the testbench.
//
// The carry select mechanism is observed inside the three top-level adders:
// for each adder the testbench counts the vectors on which at least one block
// received a carry-in of 1 (its multiplexers selected the carry-in-1 sum);
// this must happen at least once per adder. The adders' carry-outs must stay
// 0: the design relies on the partial sums fitting their adder widths.
module tb_vedic_16x16;
  localparam int NRAND = 200000;

  logic [15:0] a, b;
  logic [31:0] c;
  int checks = 0, failures = 0;

  // mechanism counters, one per top-level adder (0: 16-bit, 1/2: 24-bit)
  int sel1_cnt [3];
  int cout_cnt [3];

  vedic_16x16 dut (.a(a), .b(b), .c(c));

  task automatic count_adder(int idx, logic [6:0] carry, int nblk);
    logic any;
    any = 1'b0;
    for (int k = 1; k < nblk; k++) any |= carry[k];
    if (any) sel1_cnt[idx]++;
    if (carry[nblk]) cout_cnt[idx]++;
  endtask

  task automatic check(input logic [15:0] x, input logic [15:0] y, input logic [31:0] exp);
    a = x;
    b = y;
    #1;
    checks++;
    if (c !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %0d*%0d: got %0d expected %0d", x, y, c, exp);
    end
    count_adder(0, 7'(dut.u_add_a.carry), 4);
    count_adder(1, 7'(dut.u_add_b.carry), 6);
    count_adder(2, 7'(dut.u_add_c.carry), 6);
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] corner [10];
    corner = '{16'h0000, 16'h0001, 16'hFFFF, 16'hFFFE, 16'h8000,
               16'h00FF, 16'hFF00, 16'hAAAA, 16'h5555, 16'h0100};
    for (int i = 0; i < 3; i++) begin
      sel1_cnt[i] = 0;
      cout_cnt[i] = 0;
    end

    // vectors printed in the reference design's 16x16 simulation result
    check(16'd24359, 16'd51263, 32'd1248715417);
    check(16'd51263, 16'd65535, 32'd3359520705);
    check(16'd37299, 16'd65534, 32'd2444352666);
    check(16'd7609,  16'd65533, 32'd498640597);
    check(16'd59953, 16'd65532, 32'd3928839996);
    check(16'd0,     16'd24359, 32'd0);

    foreach (corner[i])
      foreach (corner[j])
        check(corner[i], corner[j], 32'(corner[i]) * 32'(corner[j]));

    for (int n = 0; n < NRAND; n++) begin
      logic [15:0] x, y;
      x = 16'($urandom);
      y = 16'($urandom);
      check(x, y, 32'(x) * 32'(y));
    end

    for (int i = 0; i < 3; i++) begin
      $display("adder %0d: carry-in-1 selection on %0d vectors, carry-out on %0d vectors",
               i, sel1_cnt[i], cout_cnt[i]);
      checks++;
      if (sel1_cnt[i] == 0) begin
        failures++;
        $display("FAIL adder %0d never selected a carry-in-1 result", i);
      end
      checks++;
      if (cout_cnt[i] != 0) begin
        failures++;
        $display("FAIL adder %0d overflowed its width", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
