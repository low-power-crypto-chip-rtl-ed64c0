// aes_top: AES crypto-chip, encryption and decryption of 128-bit blocks.
//
// The chip is an aes_key_expansion (key register, schedule and round-key
// store) feeding an aes_core (state register plus one-round datapath used
// once per clock). Use:
//   1. Pulse key_load for one clock with the cipher key on key. The key is
//      taken only when no block is in its rounds (busy low); key_ready rises
//      4*(Nr+1)-Nk clocks later (40 clocks for AES-128).
//   2. Offer blocks with in_valid, in_decrypt (0 encrypt, 1 decrypt) and
//      in_data; a block is taken in a clock where in_ready is high. in_ready
//      is low while keys are being expanded, while a block is in flight, and
//      in a clock where key_load is taken (the new key wins).
//   3. The result appears on out_data with out_valid Nr+1 clocks after the
//      block was taken and is held until out_ready.
// KEY_BITS (128 by default, or 192 / 256) fixes the key size and with it the
// round count Nr = KEY_BITS/32 + 6. Reset is asynchronous and active low.
// AES-128 is the main configuration; the port protocol, the refusal of a
// key load during rounds and the reset style are this implementation's own.
module aes_top
  import aes_pkg::*;
#(
  parameter int unsigned KEY_BITS = 128
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                key_load,
  input  logic [KEY_BITS-1:0] key,
  output logic                key_ready,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic                in_decrypt,
  input  block_t              in_data,
  output logic                out_valid,
  input  logic                out_ready,
  output block_t              out_data,
  output logic                busy
);

  localparam int unsigned NR = num_rounds(KEY_BITS / 32);

  logic                core_busy, kexp_busy, key_take, core_in_ready;
  logic [RK_IDX_W-1:0] rk_index;
  block_t              round_key;

  // A new key is refused while a block is in its rounds
  assign key_take = key_load && !core_busy;

  aes_key_expansion #(.KEY_BITS(KEY_BITS)) u_kexp (
    .clk      (clk),
    .rst_n    (rst_n),
    .key_load (key_take),
    .key      (key),
    .key_ready(key_ready),
    .busy     (kexp_busy),
    .rk_index (rk_index),
    .round_key(round_key)
  );

  aes_core #(.NR(NR)) u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .key_ready (key_ready),
    .in_valid  (in_valid && !key_take),
    .in_ready  (core_in_ready),
    .in_decrypt(in_decrypt),
    .in_data   (in_data),
    .rk_index  (rk_index),
    .round_key (round_key),
    .out_valid (out_valid),
    .out_ready (out_ready),
    .out_data  (out_data),
    .busy      (core_busy)
  );

  assign in_ready = core_in_ready && !key_take;
  assign busy     = core_busy || kexp_busy;

endmodule
