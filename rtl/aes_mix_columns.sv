// aes_mix_columns: MixColumns (INVERSE=0) or InvMixColumns (INVERSE=1).
//
// Each state column is taken as a polynomial over GF(2^8) and multiplied by
// the fixed polynomial a(x) = {03}x^3 + {01}x^2 + {01}x + {02} modulo x^4+1,
// which is the circulant matrix with first row {02 03 01 01}; addition is XOR.
// The inverse uses {0e 0b 0d 09}. Products by constants are built from
// xtime (multiply by x). The four columns are processed in parallel, purely
// combinationally.
module aes_mix_columns
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  block_t state_in,
  output block_t state_out
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    byte_t a [4];
    byte_t y [4];
    for (genvar r = 0; r < 4; r++) begin : g_in
      assign a[r] = state_in[127 - 8*(4*c + r) -: 8];
      assign state_out[127 - 8*(4*c + r) -: 8] = y[r];
    end

    always_comb begin
      byte_t x2 [4];
      byte_t x4 [4];
      byte_t x8 [4];
      for (int i = 0; i < 4; i++) begin
        x2[i] = xtime(a[i]);
        x4[i] = xtime(x2[i]);
        x8[i] = xtime(x4[i]);
      end
      for (int r = 0; r < 4; r++) begin
        if (!INVERSE) begin
          // 02*a[r] ^ 03*a[r+1] ^ a[r+2] ^ a[r+3]
          y[r] = x2[r] ^ (x2[(r+1)%4] ^ a[(r+1)%4]) ^ a[(r+2)%4] ^ a[(r+3)%4];
        end else begin
          // 0e*a[r] ^ 0b*a[r+1] ^ 0d*a[r+2] ^ 09*a[r+3]
          y[r] = (x8[r] ^ x4[r] ^ x2[r])
               ^ (x8[(r+1)%4] ^ x2[(r+1)%4] ^ a[(r+1)%4])
               ^ (x8[(r+2)%4] ^ x4[(r+2)%4] ^ a[(r+2)%4])
               ^ (x8[(r+3)%4] ^ a[(r+3)%4]);
        end
      end
    end
  end

endmodule
