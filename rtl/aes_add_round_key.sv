// aes_add_round_key: AddRoundKey, the bitwise XOR of the 128-bit state with
// the 128-bit round key, byte by byte and column by column. It is its own
// inverse, so encryption and decryption use the same block. Combinational.
module aes_add_round_key
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);

  assign state_out = state_in ^ round_key;

endmodule
