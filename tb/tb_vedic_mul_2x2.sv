// tb_vedic_mul_2x2: exhaustive self-checking test of the 2x2 Urdhva cell.
// All 16 operand pairs are applied; each product is compared with the integer
// product a*b computed in the testbench. Counts how often the column-1 carry
// (both crosswise products 1) occurs and fails if it never does. A watchdog
// ends the run after a fixed time.
module tb_vedic_mul_2x2;

  logic [1:0] a, b;
  logic [3:0] p;
  int checks = 0, failures = 0, col_carry = 0;

  vedic_mul_2x2 dut (.a(a), .b(b), .p(p));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i); b = 2'(j);
        #1;
        checks++;
        if (p !== 4'(i * j)) begin
          failures++;
          $display("FAIL %0d*%0d: got %0d", i, j, p);
        end
        if (a[1] & b[0] & a[0] & b[1]) col_carry++;
      end
    end
    checks++;
    if (col_carry == 0) begin failures++; $display("FAIL column carry never exercised"); end
    $display("column-1 carries exercised: %0d", col_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
