// vedic_merge: adder stages that join the four half-size partial products of
// an N x N Vedic multiplier into the 2N-bit product.
//
// With H = N/2 and operands a = {aH, aL}, b = {bH, bL}, the inputs are
//   ll = aL*bL, hl = aH*bL, lh = aL*bH, hh = aH*bH   (N bits each).
// Two N-bit adder stages form the middle of the product:
//   stage 1: X = hl + lh                       (carry c1)
//   stage 2: M = X + {hh[H-1:0], ll[N-1:H]}    (carry c2)
// and an H-bit adder used as incrementer forms the top quarter,
// hh[N-1:H] + c1 + c2. The product is {top, M, ll[H-1:0]}.
//
// The two N-bit adder stages follow the reference design; how they are wired and the
// extra H-bit incrementer for the carries are this design's choice. The carry
// out of the incrementer (c3) is left unread on purpose: an N x N product
// always fits in 2N bits, so it is always 0.
//
// Interface: four N-bit partial products in, 2N-bit product out. Purely
// combinational. N must be even.
module vedic_merge #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   ll,
  input  logic [N-1:0]   hl,
  input  logic [N-1:0]   lh,
  input  logic [N-1:0]   hh,
  output logic [2*N-1:0] p
);
  localparam int unsigned H = N / 2;

  logic [N-1:0] cross_sum, mid_sum;
  logic [H-1:0] top_sum;
  logic         c1, c2, c3;

  // Stage 1: sum of the two crosswise products.
  binary_adder #(.W(N)) u_stage1 (
    .a(hl), .b(lh), .cin(1'b0), .sum(cross_sum), .cout(c1));

  // Stage 2: add it to the middle N bits of {hh, ll}.
  binary_adder #(.W(N)) u_stage2 (
    .a(cross_sum), .b({hh[H-1:0], ll[N-1:H]}), .cin(1'b0),
    .sum(mid_sum), .cout(c2));

  // Top quarter: high half of hh plus both carries.
  binary_adder #(.W(H)) u_top (
    .a(hh[N-1:H]), .b({{(H-1){1'b0}}, c1}), .cin(c2),
    .sum(top_sum), .cout(c3));

  assign p = {top_sum, mid_sum, ll[H-1:0]};
endmodule
