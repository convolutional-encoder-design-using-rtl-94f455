// tb_conv_encoder: end-to-end self-checking test of the block convolutional
// encoder.
//
// dut     : the encoder with every parameter at its default (16-bit message,
//           generators 0x0006 and 0x0008). It is given the reference example
//           (message 0x0030 -> 0x00000120 and 0x00000180), every message with a
//           single bit set, all-ones, and random messages.
// dut_g   : a 16-bit encoder with dense generators, so that both 16-bit adder
//           stages of the multiplier carry.
// dut8/4  : the 8-bit and 4-bit configurations of the same RTL.
// Each output is compared with msg * G computed by the testbench. The test
// also computes the XOR (carry-less) convolution of message and generator and
// counts messages where the two agree (no carry between partial products) and
// where they differ (carries occurred); each of these, and each adder-stage
// carry, must happen at least once. A watchdog ends the run.
module tb_conv_encoder;

  localparam logic [15:0] GA = 16'hB7A3;
  localparam logic [15:0] GB = 16'hFFFF;
  localparam logic [15:0] GD1 = 16'h0006;   // expected defaults, stated here
  localparam logic [15:0] GD2 = 16'h0008;   // independently of the package

  logic [15:0] msg, msg_g;
  logic [31:0] enc1, enc2, enc1_g, enc2_g;
  logic [7:0]  msg8;
  logic [15:0] enc1_8, enc2_8;
  logic [3:0]  msg4;
  logic [7:0]  enc1_4, enc2_4;

  int checks = 0, failures = 0;
  int no_carry = 0, with_carry = 0, stage1_carry = 0, stage2_carry = 0;

  conv_encoder dut (.msg_bit(msg), .encoded_bit_1(enc1), .encoded_bit_2(enc2));
  conv_encoder #(.N(16), .G1(GA), .G2(GB)) dut_g (
    .msg_bit(msg_g), .encoded_bit_1(enc1_g), .encoded_bit_2(enc2_g));
  conv_encoder #(.N(8), .G1(8'h06), .G2(8'h08)) dut8 (
    .msg_bit(msg8), .encoded_bit_1(enc1_8), .encoded_bit_2(enc2_8));
  conv_encoder #(.N(4), .G1(4'h6), .G2(4'h8)) dut4 (
    .msg_bit(msg4), .encoded_bit_1(enc1_4), .encoded_bit_2(enc2_4));

  function automatic logic [31:0] clmul16(input logic [15:0] x, input logic [15:0] g);
    logic [31:0] r = '0;
    for (int i = 0; i < 16; i++) if (g[i]) r ^= 32'(x) << i;
    return r;
  endfunction

  task automatic expect32(input string what, input logic [31:0] got, input logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  task automatic run_default(input logic [15:0] m);
    logic [31:0] w1, w2;
    msg = m;
    #1;
    w1 = 32'(m) * 32'(GD1);
    w2 = 32'(m) * 32'(GD2);
    expect32($sformatf("default enc1 msg=%h", m), enc1, w1);
    expect32($sformatf("default enc2 msg=%h", m), enc2, w2);
    if (w1 == clmul16(m, GD1)) no_carry++; else with_carry++;
  endtask

  task automatic run_dense(input logic [15:0] m);
    logic [16:0] s1, s2;
    logic [15:0] hl, lh;
    msg_g = m;
    #1;
    expect32($sformatf("dense enc1 msg=%h", m), enc1_g, 32'(m) * 32'(GA));
    expect32($sformatf("dense enc2 msg=%h", m), enc2_g, 32'(m) * 32'(GB));
    hl = 16'(m[15:8]) * 16'(GA[7:0]);
    lh = 16'(m[7:0]) * 16'(GA[15:8]);
    s1 = 17'(hl) + 17'(lh);
    s2 = 17'(s1[15:0]) + 17'({8'(16'(m[15:8]) * 16'(GA[15:8])),
                              8'((16'(m[7:0]) * 16'(GA[7:0])) >> 8)});
    if (s1[16]) stage1_carry++;
    if (s2[16]) stage2_carry++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Reference example of the 16-bit configuration.
    msg = 16'h0030;
    #1;
    expect32("example enc1", enc1, 32'h0000_0120);
    expect32("example enc2", enc2, 32'h0000_0180);

    run_default(16'h0000);
    run_default(16'hFFFF);
    for (int i = 0; i < 16; i++) run_default(16'h1 << i);
    for (int i = 0; i < 5000; i++) run_default(16'($urandom));

    run_dense(16'hFFFF);
    for (int i = 0; i < 5000; i++) run_dense(16'($urandom));

    for (int i = 0; i < 256; i++) begin
      msg8 = 8'(i);
      #1;
      expect32($sformatf("8-bit enc1 msg=%h", i), 32'(enc1_8), 32'(i * 6));
      expect32($sformatf("8-bit enc2 msg=%h", i), 32'(enc2_8), 32'(i * 8));
    end
    for (int i = 0; i < 16; i++) begin
      msg4 = 4'(i);
      #1;
      expect32($sformatf("4-bit enc1 msg=%h", i), 32'(enc1_4), 32'(i * 6));
      expect32($sformatf("4-bit enc2 msg=%h", i), 32'(enc2_4), 32'(i * 8));
    end

    checks += 4;
    if (no_carry == 0)     begin failures++; $display("FAIL carry-free message never seen"); end
    if (with_carry == 0)   begin failures++; $display("FAIL carrying message never seen"); end
    if (stage1_carry == 0) begin failures++; $display("FAIL stage-1 carry never exercised"); end
    if (stage2_carry == 0) begin failures++; $display("FAIL stage-2 carry never exercised"); end
    $display("default encoder: %0d carry-free messages, %0d with carries", no_carry, with_carry);
    $display("dense encoder: stage-1 carries %0d, stage-2 carries %0d", stage1_carry, stage2_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
