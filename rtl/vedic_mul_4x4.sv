// vedic_mul_4x4: 4 x 4-bit unsigned Vedic (Urdhva Tiryakbhyam) multiplier.
//
// Each operand is split into a high and a low half of 2 bits. Four
// vedic_mul_2x2 modules form the vertical (low*low, high*high) and crosswise
// (high*low, low*high) half-size products in parallel, and vedic_merge adds
// them with two 4-bit adder stages into the 8-bit product.
// The 4x4 module is built the same way from four 2x2 Urdhva cells; the
// reference design gives only the general method, so this split is this design's
// choice. It is also the multiplier of the 4-bit encoder.
//
// Interface: a, b are 4-bit operands; p = a*b, 8 bits. Purely
// combinational.
module vedic_mul_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] ll, hl, lh, hh;

  vedic_mul_2x2 u_ll (.a(a[1:0]), .b(b[1:0]), .p(ll));
  vedic_mul_2x2 u_hl (.a(a[3:2]), .b(b[1:0]), .p(hl));
  vedic_mul_2x2 u_lh (.a(a[1:0]), .b(b[3:2]), .p(lh));
  vedic_mul_2x2 u_hh (.a(a[3:2]), .b(b[3:2]), .p(hh));

  vedic_merge #(.N(4)) u_merge (.ll(ll), .hl(hl), .lh(lh), .hh(hh), .p(p));
endmodule
