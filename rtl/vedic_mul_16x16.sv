// vedic_mul_16x16: 16 x 16-bit unsigned Vedic (Urdhva Tiryakbhyam) multiplier.
//
// Each operand is split into a high and a low half of 8 bits. Four
// vedic_mul_8x8 modules form the vertical (low*low, high*high) and crosswise
// (high*low, low*high) half-size products in parallel, and vedic_merge adds
// them with two 16-bit adder stages into the 32-bit product.
// This is the reference design's 16x16 multiplier: four 8x8 Vedic modules and two
// 16-bit adder stages. It is the multiplier of the 16-bit encoder.
//
// Interface: a, b are 16-bit operands; p = a*b, 32 bits. Purely
// combinational.
module vedic_mul_16x16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p
);
  logic [15:0] ll, hl, lh, hh;

  vedic_mul_8x8 u_ll (.a(a[7:0]), .b(b[7:0]), .p(ll));
  vedic_mul_8x8 u_hl (.a(a[15:8]), .b(b[7:0]), .p(hl));
  vedic_mul_8x8 u_lh (.a(a[7:0]), .b(b[15:8]), .p(lh));
  vedic_mul_8x8 u_hh (.a(a[15:8]), .b(b[15:8]), .p(hh));

  vedic_merge #(.N(16)) u_merge (.ll(ll), .hl(hl), .lh(lh), .hh(hh), .p(p));
endmodule
