// vedic_mul_2x2: 2x2-bit unsigned multiplier by the Urdhva Tiryakbhyam
// ("vertically and crosswise") rule; the leaf cell of the Vedic multiplier.
//
// Column 0 is the vertical product a0*b0. Column 1 adds the two crosswise
// products a1*b0 and a0*b1 with a half adder; its sum is product bit 1 and its
// carry moves to column 2. Column 2 adds the vertical product a1*b1 to that
// carry with a second half adder, giving bits 2 and 3. This is the column rule
// of the method (digits on one crosswise line are added to the previous carry,
// the low digit is the result and the rest is carried on) written for binary
// digits; the gate-level form with two half adders is this design's choice.
//
// Interface: a, b are 2-bit operands; p = a*b, 4 bits. Purely combinational.
module vedic_mul_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic cross0, cross1, top, c1;

  always_comb begin
    cross0 = a[1] & b[0];
    cross1 = a[0] & b[1];
    top    = a[1] & b[1];
    c1     = cross0 & cross1;       // carry of column 1
    p[0]   = a[0] & b[0];           // column 0: vertical
    p[1]   = cross0 ^ cross1;       // column 1: crosswise sum
    p[2]   = top ^ c1;              // column 2: vertical + carry
    p[3]   = top & c1;              // carry out of column 2
  end
endmodule
