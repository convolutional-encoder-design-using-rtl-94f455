// tb_vedic_mul_4x4: exhaustive self-checking test of the 4 x 4 Vedic
// multiplier. Every operand pair is applied and the product compared with
// a*b computed by the testbench. The run counts how often the two adder
// stages of the top level carry (from an independent model of the stages) and
// fails if either never does. A watchdog ends the run.
module tb_vedic_mul_4x4;
  localparam int unsigned N = 4;
  localparam int unsigned H = N / 2;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0, stage1_carry = 0, stage2_carry = 0;

  vedic_mul_4x4 dut (.a(a), .b(b), .p(p));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << N); i++)
      for (int j = 0; j < (1 << N); j++) begin
        int hl, lh, hh, ll, s1, s2;
        a = N'(i); b = N'(j);
        #1;
        checks++;
        if (p !== (2*N)'(i * j)) begin
          failures++;
          $display("FAIL %0d*%0d: got %0d", i, j, p);
        end
        ll = (i % (1 << H)) * (j % (1 << H));
        hl = (i >> H) * (j % (1 << H));
        lh = (i % (1 << H)) * (j >> H);
        hh = (i >> H) * (j >> H);
        s1 = hl + lh;
        s2 = (s1 % (1 << N)) + ((hh % (1 << H)) << H) + (ll >> H);
        if (s1 >= (1 << N)) stage1_carry++;
        if (s2 >= (1 << N)) stage2_carry++;
      end
    checks += 2;
    if (stage1_carry == 0) begin failures++; $display("FAIL stage-1 carry never exercised"); end
    if (stage2_carry == 0) begin failures++; $display("FAIL stage-2 carry never exercised"); end
    $display("stage-1 carries: %0d, stage-2 carries: %0d", stage1_carry, stage2_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
