// aes_sbox: AES Substitute Byte (INVERSE = 0) or its inverse (INVERSE = 1) on
// one byte. Purely combinational: a lookup in the 256-entry table that aes_pkg
// computes from the GF(2^8) definition at elaboration time, so it maps onto a
// ROM or LUTs. In the masked design the forward S-box is the masking function
// and the inverse S-box removes the mask inside the key expansion.
module aes_sbox
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  byte_t in,
  output byte_t out
);

  always_comb out = INVERSE ? INV_SBOX[in] : SBOX[in];

endmodule
