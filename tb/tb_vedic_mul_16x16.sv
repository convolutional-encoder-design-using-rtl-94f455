// tb_vedic_mul_16x16: self-checking test of the 16x16 Vedic multiplier.
// Corner cases (zero, all ones, single high bits, the reference encoder
// operands) and 40000 random operand pairs are applied; each product is
// compared with a*b computed by the testbench. The run counts how often the
// two 16-bit adder stages carry (from an independent model of the stages) and
// fails if either never does. A watchdog ends the run.
module tb_vedic_mul_16x16;
  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0, stage1_carry = 0, stage2_carry = 0;

  vedic_mul_16x16 dut (.a(a), .b(b), .p(p));

  task automatic check(input logic [15:0] x, input logic [15:0] y);
    logic [31:0] ll, hl, lh, hh;
    logic [32:0] s1, s2;
    a = x; b = y;
    #1;
    checks++;
    if (p !== 32'(x) * 32'(y)) begin
      failures++;
      $display("FAIL %h*%h: got %h want %h", x, y, p, 32'(x) * 32'(y));
    end
    ll = 32'(x[7:0]) * 32'(y[7:0]);
    hl = 32'(x[15:8]) * 32'(y[7:0]);
    lh = 32'(x[7:0]) * 32'(y[15:8]);
    hh = 32'(x[15:8]) * 32'(y[15:8]);
    s1 = 33'(hl) + 33'(lh);
    s2 = 33'(s1[15:0]) + 33'({hh[7:0], ll[15:8]});
    if (s1 > 33'h0FFFF) stage1_carry++;
    if (s2 > 33'h0FFFF) stage2_carry++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h0000, 16'h0000);
    check(16'hFFFF, 16'hFFFF);
    check(16'hFFFF, 16'h0001);
    check(16'h8000, 16'h8000);
    check(16'h00FF, 16'hFF00);
    check(16'h0030, 16'h0006);
    check(16'h0030, 16'h0008);
    for (int i = 0; i < 40000; i++) check(16'($urandom), 16'($urandom));
    checks += 2;
    if (stage1_carry == 0) begin failures++; $display("FAIL stage-1 carry never exercised"); end
    if (stage2_carry == 0) begin failures++; $display("FAIL stage-2 carry never exercised"); end
    $display("stage-1 carries: %0d, stage-2 carries: %0d", stage1_carry, stage2_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
