// aes_sbox: the AES substitution box as a 256-entry lookup table.
//
// The input byte addresses the table: its high nibble picks the row and its
// low nibble the column of the familiar 16x16 S-box layout, and the entry
// replaces the byte. INVERSE=1 selects the inverse table used by decryption.
// The table is a constant computed at elaboration by aes_pkg (GF(2^8) inverse
// plus affine map); at run time the block is a pure read-only lookup, which is
// how the design substitutes bytes. Purely combinational, no clock.
module aes_sbox
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  byte_t in_byte,
  output byte_t out_byte
);

  localparam sbox_table_t TABLE = INVERSE ? gen_inv_sbox() : gen_sbox();

  assign out_byte = TABLE[in_byte];

endmodule
