// aes_shift_rows: ShiftRows (INVERSE=0) or InvShiftRows (INVERSE=1).
//
// Row r of the 4x4 state is rotated cyclically by r byte positions: to the
// left for encryption, to the right for decryption. Row 0 stays in place.
// With byte n at row n%4, column n/4, output column c of row r takes the byte
// of input column (c+r)%4 (left) or (c-r)%4 (right). Pure wiring.
module aes_shift_rows
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  block_t state_in,
  output block_t state_out
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      localparam int SRC_C = INVERSE ? (c + 4 - r) % 4 : (c + r) % 4;
      assign state_out[127 - 8*(4*c + r) -: 8] = state_in[127 - 8*(4*SRC_C + r) -: 8];
    end
  end

endmodule
