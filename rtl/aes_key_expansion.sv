// aes_key_expansion: cipher-key register, key schedule and round-key store.
//
// On key_load the cipher key (first word in the MSBs) is written into the
// first Nk words of a word store; that part of the store is the key register.
// The schedule then produces one 32-bit word per clock, for i = Nk .. 4*(Nr+1)-1:
//   temp = w[i-1]
//   i mod Nk == 0           : temp = SubWord(RotWord(temp)) ^ {Rcon, 24'h0}
//   Nk > 6 and i mod Nk == 4: temp = SubWord(temp)
//   w[i] = w[i-Nk] ^ temp
// Rcon starts at 01 and is doubled in GF(2^8) after each use. SubWord uses
// four aes_sbox lookups of its own. Expansion takes 4*(Nr+1)-Nk clocks
// (40 for a 128-bit key); key_ready rises in the clock after the last word is
// written and falls on a new key_load. All Nr+1 round keys stay in the store,
// so the decryption side can read them in reverse order; rk_index selects one
// round key (words 4*rk_index .. 4*rk_index+3) through a combinational read.
// KEY_BITS may be 128 (default), 192 or 256, fixed at elaboration.
// The schedule itself is the AES one; generating a word per clock into a
// full store, rather than on the fly per round, is this implementation's choice.
module aes_key_expansion
  import aes_pkg::*;
#(
  parameter int unsigned KEY_BITS = 128
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                key_load,
  input  logic [KEY_BITS-1:0] key,
  output logic                key_ready,
  output logic                busy,
  input  logic [RK_IDX_W-1:0] rk_index,
  output block_t              round_key
);

  localparam int unsigned NK = KEY_BITS / 32;
  localparam int unsigned NR = num_rounds(NK);
  localparam int unsigned NW = 4 * (NR + 1);
  localparam int unsigned IW = $clog2(NW);

  initial begin
    assert (KEY_BITS == 128 || KEY_BITS == 192 || KEY_BITS == 256)
      else $error("aes_key_expansion: KEY_BITS must be 128, 192 or 256");
  end

  word_t           w_mem [NW];
  logic [IW-1:0]   widx;        // index i of the word being generated
  logic [2:0]      wmod;        // i mod Nk
  byte_t           rcon;

  // ---- next word --------------------------------------------------------
  word_t prev_w, old_w, sub_in, sub_out, temp, new_w;

  assign prev_w = w_mem[widx - IW'(1)];
  assign old_w  = w_mem[widx - IW'(NK)];
  assign sub_in = (wmod == 3'd0) ? {prev_w[23:0], prev_w[31:24]} : prev_w;

  for (genvar b = 0; b < 4; b++) begin : g_subword
    aes_sbox #(.INVERSE(1'b0)) u_sbox (
      .in_byte (sub_in [8*b +: 8]),
      .out_byte(sub_out[8*b +: 8])
    );
  end

  always_comb begin
    if (wmod == 3'd0)                 temp = sub_out ^ {rcon, 24'h0};
    else if (NK > 6 && wmod == 3'd4)  temp = sub_out;
    else                              temp = prev_w;
    new_w = old_w ^ temp;
  end

  // ---- control and store -------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      key_ready <= 1'b0;
      widx      <= '0;
      wmod      <= '0;
      rcon      <= 8'h01;
    end else if (key_load) begin
      busy      <= 1'b1;
      key_ready <= 1'b0;
      widx      <= IW'(NK);
      wmod      <= '0;
      rcon      <= 8'h01;
    end else if (busy) begin
      widx <= widx + IW'(1);
      wmod <= (wmod == 3'(NK - 1)) ? 3'd0 : wmod + 3'd1;
      if (wmod == 3'd0) rcon <= xtime(rcon);
      if (widx == IW'(NW - 1)) begin
        busy      <= 1'b0;
        key_ready <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (key_load) begin
      for (int k = 0; k < int'(NK); k++) w_mem[k] <= key[KEY_BITS-1-32*k -: 32];
    end else if (busy) begin
      w_mem[widx] <= new_w;
    end
  end

  // ---- round-key read port ----------------------------------------------
  always_comb begin
    round_key = '0;
    if (rk_index <= RK_IDX_W'(NR))
      round_key = {w_mem[{rk_index, 2'd0}], w_mem[{rk_index, 2'd1}],
                   w_mem[{rk_index, 2'd2}], w_mem[{rk_index, 2'd3}]};
  end

endmodule
