// vedic_mul_8x8: 8 x 8-bit unsigned Vedic (Urdhva Tiryakbhyam) multiplier.
//
// Each operand is split into a high and a low half of 4 bits. Four
// vedic_mul_4x4 modules form the vertical (low*low, high*high) and crosswise
// (high*low, low*high) half-size products in parallel, and vedic_merge adds
// them with two 8-bit adder stages into the 16-bit product.
// The reference design names the 8x8 module as the building block of the 16x16
// one; that it is built the same way, from four 4x4 modules, is this design's
// choice. It is also the multiplier of the 8-bit encoder.
//
// Interface: a, b are 8-bit operands; p = a*b, 16 bits. Purely
// combinational.
module vedic_mul_8x8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [15:0] p
);
  logic [7:0] ll, hl, lh, hh;

  vedic_mul_4x4 u_ll (.a(a[3:0]), .b(b[3:0]), .p(ll));
  vedic_mul_4x4 u_hl (.a(a[7:4]), .b(b[3:0]), .p(hl));
  vedic_mul_4x4 u_lh (.a(a[3:0]), .b(b[7:4]), .p(lh));
  vedic_mul_4x4 u_hh (.a(a[7:4]), .b(b[7:4]), .p(hh));

  vedic_merge #(.N(8)) u_merge (.ll(ll), .hl(hl), .lh(lh), .hh(hh), .p(p));
endmodule
