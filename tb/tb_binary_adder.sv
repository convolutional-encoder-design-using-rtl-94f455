// tb_binary_adder: self-checking test of the ripple-carry adder at its default
// width (16) and at 8 bits. Corner cases (all ones, carry in, full carry
// ripple) and random operands are compared with a + b + cin computed in the
// testbench at W+1 bits, carry out included. A watchdog ends the run.
module tb_binary_adder;

  logic [15:0] a16, b16, s16;
  logic [7:0]  a8, b8, s8;
  logic        cin, co16, co8;
  int checks = 0, failures = 0, carries = 0;

  binary_adder        dut16 (.a(a16), .b(b16), .cin(cin), .sum(s16), .cout(co16));
  binary_adder #(.W(8)) dut8 (.a(a8), .b(b8), .cin(cin), .sum(s8), .cout(co8));

  task automatic apply(input logic [15:0] x, input logic [15:0] y, input logic c);
    logic [16:0] ref16;
    logic [8:0]  ref8;
    a16 = x; b16 = y; a8 = x[7:0]; b8 = y[7:0]; cin = c;
    #1;
    ref16 = {1'b0, x} + {1'b0, y} + 17'(c);
    ref8  = {1'b0, x[7:0]} + {1'b0, y[7:0]} + 9'(c);
    checks += 2;
    if ({co16, s16} !== ref16) begin
      failures++;
      $display("FAIL W=16 %h+%h+%b: got %b_%h want %h", x, y, c, co16, s16, ref16);
    end
    if ({co8, s8} !== ref8) begin
      failures++;
      $display("FAIL W=8 %h+%h+%b: got %b_%h want %h", x[7:0], y[7:0], c, co8, s8, ref8);
    end
    if (co16) carries++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(16'h0000, 16'h0000, 1'b0);
    apply(16'hFFFF, 16'h0000, 1'b1);
    apply(16'hFFFF, 16'hFFFF, 1'b1);
    apply(16'h8000, 16'h8000, 1'b0);
    apply(16'h7FFF, 16'h0001, 1'b0);
    apply(16'h5555, 16'hAAAA, 1'b1);
    for (int i = 0; i < 5000; i++)
      apply(16'($urandom), 16'($urandom), 1'($urandom));
    checks++;
    if (carries == 0) begin failures++; $display("FAIL carry out never exercised"); end
    $display("carry-out cases: %0d", carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
