// tb_conv_encoder_full: the encoder exactly as configured by default (16-bit
// message, generators 0x0006 and 0x0008), with no parameter overridden.
// It applies the reference example (0x0030 -> 0x00000120, 0x00000180) and then
// every one of the 65536 possible messages, comparing both encoded words with
// msg * 6 and msg * 8 computed by the testbench. A watchdog ends the run.
module tb_conv_encoder_full;
  logic [15:0] msg;
  logic [31:0] enc1, enc2;
  int checks = 0, failures = 0;

  conv_encoder dut (.msg_bit(msg), .encoded_bit_1(enc1), .encoded_bit_2(enc2));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg = 16'h0030;
    #1;
    checks += 2;
    if (enc1 !== 32'h0000_0120) begin failures++; $display("FAIL example enc1 %h", enc1); end
    if (enc2 !== 32'h0000_0180) begin failures++; $display("FAIL example enc2 %h", enc2); end
    for (int m = 0; m < 65536; m++) begin
      msg = 16'(m);
      #1;
      checks += 2;
      if (enc1 !== 32'(m * 6)) begin
        failures++;
        $display("FAIL msg=%h enc1 got %h want %h", m, enc1, 32'(m * 6));
      end
      if (enc2 !== 32'(m * 8)) begin
        failures++;
        $display("FAIL msg=%h enc2 got %h want %h", m, enc2, 32'(m * 8));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
