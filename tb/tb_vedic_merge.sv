// tb_vedic_merge: self-checking test of the partial-product adder stages at
// the default width (16) and at 4 bits. The four inputs are driven with
// arbitrary values, not only real partial products, and the output compared
// with ({hh, ll} + ((hl + lh) << N/2)) mod 2^(2N), computed by the testbench.
// Counts cases where the top-quarter incrementer receives both carries and
// fails if none occurs. A watchdog ends the run.
module tb_vedic_merge;
  logic [15:0] ll, hl, lh, hh;
  logic [31:0] p;
  logic [3:0]  ll4, hl4, lh4, hh4;
  logic [7:0]  p4;
  int checks = 0, failures = 0, double_carry = 0;

  vedic_merge          dut   (.ll(ll), .hl(hl), .lh(lh), .hh(hh), .p(p));
  vedic_merge #(.N(4)) dut4  (.ll(ll4), .hl(hl4), .lh(lh4), .hh(hh4), .p(p4));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [32:0] s1, s2;
    logic [31:0] want;
    logic [7:0]  want4;
    for (int i = 0; i < 20000; i++) begin
      ll = 16'($urandom); hl = 16'($urandom); lh = 16'($urandom); hh = 16'($urandom);
      if (i < 4) begin ll = '1; hl = '1; lh = '1; hh = '1; end
      #1;
      want = {hh, ll} + ((32'(hl) + 32'(lh)) << 8);
      checks++;
      if (p !== want) begin
        failures++;
        $display("FAIL ll=%h hl=%h lh=%h hh=%h: got %h want %h", ll, hl, lh, hh, p, want);
      end
      s1 = 33'(hl) + 33'(lh);
      s2 = 33'(s1[15:0]) + 33'({hh[7:0], ll[15:8]});
      if (s1[16] && s2[16]) double_carry++;
    end
    for (int i = 0; i < 65536; i++) begin
      {ll4, hl4, lh4, hh4} = 16'(i);
      #1;
      want4 = {hh4, ll4} + ((8'(hl4) + 8'(lh4)) << 2);
      checks++;
      if (p4 !== want4) begin
        failures++;
        $display("FAIL N=4 ll=%h hl=%h lh=%h hh=%h: got %h want %h", ll4, hl4, lh4, hh4, p4, want4);
      end
    end
    checks++;
    if (double_carry == 0) begin failures++; $display("FAIL double carry never exercised"); end
    $display("cases with both stage carries: %0d", double_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
