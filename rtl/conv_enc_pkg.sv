// conv_enc_pkg: constants shared by the block convolutional encoder and its
// testbenches.
//
// The encoder works on 16-bit message blocks (the 16-bit configuration is the
// main one; 4- and 8-bit variants use the same RTL with a smaller N). The two
// generator words G1 and G2 are this design's choice: they reproduce the
// example output of the reference simulation, where the message 0x0030
// encodes to 0x0120 on the first output and to a word ending in 1000_0000 on
// the second.
package conv_enc_pkg;
  localparam int unsigned MSG_W = 16;
  localparam logic [MSG_W-1:0] GEN1_DEFAULT = 16'h0006;
  localparam logic [MSG_W-1:0] GEN2_DEFAULT = 16'h0008;
endpackage
