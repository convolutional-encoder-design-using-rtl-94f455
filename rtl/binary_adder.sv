// binary_adder: W-bit ripple-carry adder with carry in and carry out.
//
// It is the adder used in the stages that merge the partial products of a
// Vedic multiplier; the 16x16 multiplier uses two 16-bit stages and an 8-bit
// instance as incrementer for the top quarter. The reference design only names the
// adder stages; the ripple-carry structure (one full adder per bit, the carry
// passed from bit i to bit i+1) is this design's choice as the simplest adder.
//
// Interface: sum = (a + b + cin) mod 2^W, cout = carry out of bit W-1.
// Purely combinational.
module binary_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    assign sum[i]     = a[i] ^ b[i] ^ carry[i];
    assign carry[i+1] = (a[i] & b[i]) | (carry[i] & (a[i] ^ b[i]));
  end

  assign cout = carry[W];
endmodule
