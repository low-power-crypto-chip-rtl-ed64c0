// aes_round: the combinational datapath of one AES round.
//
// Encryption (decrypt=0):  SubBytes -> ShiftRows -> MixColumns -> AddRoundKey
// Decryption (decrypt=1):  InvShiftRows -> InvSubBytes -> AddRoundKey -> InvMixColumns
// final_round=1 drops (Inv)MixColumns, as the last AES round does. The
// decryption order is the straightforward inverse cipher of FIPS-197, which
// takes the round keys in reverse order without modifying them. The two
// chains are separate hardware and a multiplexer picks the result; sharing
// logic between them is not attempted.
module aes_round
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  input  logic   decrypt,
  input  logic   final_round,
  output block_t state_out
);

  // Encryption chain
  block_t e_sb, e_sr, e_mc, e_pre, e_out;
  aes_sub_bytes   #(.INVERSE(1'b0)) u_e_sb (.state_in(state_in), .state_out(e_sb));
  aes_shift_rows  #(.INVERSE(1'b0)) u_e_sr (.state_in(e_sb),     .state_out(e_sr));
  aes_mix_columns #(.INVERSE(1'b0)) u_e_mc (.state_in(e_sr),     .state_out(e_mc));
  assign e_pre = final_round ? e_sr : e_mc;
  aes_add_round_key u_e_ark (.state_in(e_pre), .round_key(round_key), .state_out(e_out));

  // Decryption chain
  block_t d_sr, d_sb, d_ark, d_mc;
  aes_shift_rows  #(.INVERSE(1'b1)) u_d_sr (.state_in(state_in), .state_out(d_sr));
  aes_sub_bytes   #(.INVERSE(1'b1)) u_d_sb (.state_in(d_sr),     .state_out(d_sb));
  aes_add_round_key u_d_ark (.state_in(d_sb), .round_key(round_key), .state_out(d_ark));
  aes_mix_columns #(.INVERSE(1'b1)) u_d_mc (.state_in(d_ark),    .state_out(d_mc));

  assign state_out = decrypt ? (final_round ? d_ark : d_mc) : e_out;

endmodule
