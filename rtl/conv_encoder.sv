// conv_encoder: block convolutional encoder with two output streams, built on
// two N x N Vedic multipliers (top of the design).
//
// A convolutional code forms each output stream as the convolution of the
// message with a generator sequence. Here the whole N-bit message block is
// treated as one word and the convolution is computed at once as a product:
//   encoded_bit_1 = msg_bit * G1,  encoded_bit_2 = msg_bit * G2
// each 2N bits wide, one Vedic multiplier per output. The generators are
// parameters, so one piece of RTL serves the 4-, 8- and 16-bit configurations
// (N = 4, 8, 16; the 16-bit one is the default), each with the Vedic
// multiplier of its size.
//
// Following the reference design: the two outputs, the port names and widths of the
// 16-bit configuration, and the use of the Vedic multiplier. This design's
// choices: the default generator words (0x0006 and 0x0008, which reproduce the
// reference example 0x0030 -> 0x0120 / ...1000_0000), a purely combinational
// datapath with no clock or reset, and unsigned integer products. Because the
// multiplier propagates carries, the outputs equal the XOR (GF(2)) convolution
// of a shift-register encoder only for message and generator pairs whose
// shifted partial products never overlap; otherwise they are integer products
// (the reference example 0x0030 * 0x0006 = 0x0120 is one of the latter).
//
// Timing: combinational; outputs settle one multiplier delay after msg_bit
// changes.
module conv_encoder
  import conv_enc_pkg::*;
#(
  parameter int unsigned   N  = MSG_W,
  parameter logic [N-1:0]  G1 = N'(GEN1_DEFAULT),
  parameter logic [N-1:0]  G2 = N'(GEN2_DEFAULT)
) (
  input  logic [N-1:0]   msg_bit,
  output logic [2*N-1:0] encoded_bit_1,
  output logic [2*N-1:0] encoded_bit_2
);
  // One Vedic multiplier per output, of the size the configuration needs.
  if (N == 16) begin : g_mul16
    vedic_mul_16x16 u_mul1 (.a(msg_bit), .b(G1), .p(encoded_bit_1));
    vedic_mul_16x16 u_mul2 (.a(msg_bit), .b(G2), .p(encoded_bit_2));
  end else if (N == 8) begin : g_mul8
    vedic_mul_8x8 u_mul1 (.a(msg_bit), .b(G1), .p(encoded_bit_1));
    vedic_mul_8x8 u_mul2 (.a(msg_bit), .b(G2), .p(encoded_bit_2));
  end else if (N == 4) begin : g_mul4
    vedic_mul_4x4 u_mul1 (.a(msg_bit), .b(G1), .p(encoded_bit_1));
    vedic_mul_4x4 u_mul2 (.a(msg_bit), .b(G2), .p(encoded_bit_2));
  end else begin : g_bad_size
    $error("conv_encoder: N must be 4, 8 or 16, got %0d", N);
  end
endmodule
