// aes_sub_bytes: SubBytes (INVERSE=0) or InvSubBytes (INVERSE=1).
//
// Each of the 16 state bytes goes through its own aes_sbox lookup, so the
// whole state is substituted in one combinational step. Byte positions are
// unchanged. Purely combinational.
module aes_sub_bytes
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  block_t state_in,
  output block_t state_out
);

  for (genvar n = 0; n < 16; n++) begin : g_byte
    aes_sbox #(.INVERSE(INVERSE)) u_sbox (
      .in_byte (state_in [127 - 8*n -: 8]),
      .out_byte(state_out[127 - 8*n -: 8])
    );
  end

endmodule
