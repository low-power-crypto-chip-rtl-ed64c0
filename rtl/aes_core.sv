// aes_core: iterative AES cipher and inverse cipher, one round per clock.
//
// A block is taken when in_valid and in_ready are both high; in_ready is high
// only while the core is idle and the round keys are ready. In that clock the
// initial AddRoundKey is applied (round key 0 for encryption, round key Nr for
// decryption) and the result loaded into the state register. Each of the next
// Nr clocks applies one aes_round, with round key r (encryption) or Nr-r
// (decryption) for round r; round Nr is the final round without
// (Inv)MixColumns. The result is then presented with out_valid, Nr+1 clocks
// after the block was taken, and held until out_ready; after the hand-over
// the core is idle again, so a block occupies the core for Nr+2 clocks at
// least. The state register is only written while a block is being taken or
// processed. rk_index tells the round-key store which key to supply; its read
// is combinational. NR is 10, 12 or 14 (128-, 192-, 256-bit keys).
// The round order and the final round follow AES; running one round per
// clock, the handshakes and the straightforward inverse cipher for
// decryption are choices of this implementation.
module aes_core
  import aes_pkg::*;
#(
  parameter int unsigned NR = 10
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                key_ready,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic                in_decrypt,
  input  block_t              in_data,
  output logic [RK_IDX_W-1:0] rk_index,
  input  block_t              round_key,
  output logic                out_valid,
  input  logic                out_ready,
  output block_t              out_data,
  output logic                busy
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} core_state_e;

  core_state_e          st;
  block_t               state_q;
  logic [RK_IDX_W-1:0]  round;      // round being applied, 1..NR
  logic                 decrypt_q;
  block_t               round_out;
  logic                 take;

  assign in_ready  = (st == S_IDLE) && key_ready;
  assign take      = in_valid && in_ready;
  assign out_valid = (st == S_DONE);
  assign out_data  = state_q;
  assign busy      = (st == S_RUN);

  always_comb begin
    if (st == S_IDLE) rk_index = in_decrypt ? RK_IDX_W'(NR) : '0;
    else              rk_index = decrypt_q ? RK_IDX_W'(NR) - round : round;
  end

  aes_round u_round (
    .state_in   (state_q),
    .round_key  (round_key),
    .decrypt    (decrypt_q),
    .final_round(round == RK_IDX_W'(NR)),
    .state_out  (round_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      round     <= '0;
      decrypt_q <= 1'b0;
    end else begin
      unique case (st)
        S_IDLE: if (take) begin
          st        <= S_RUN;
          round     <= RK_IDX_W'(1);
          decrypt_q <= in_decrypt;
        end
        S_RUN: begin
          if (round == RK_IDX_W'(NR)) st <= S_DONE;
          else                        round <= round + RK_IDX_W'(1);
        end
        S_DONE: if (out_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  // State register: initial AddRoundKey on take, one round per clock after
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              state_q <= '0;
    else if (take)           state_q <= in_data ^ round_key;
    else if (st == S_RUN)    state_q <= round_out;
  end

  // Output handshake: a presented result stays put until it is taken
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_valid && $stable(out_data))
    else $error("aes_core: result changed before it was taken");

  assert property (@(posedge clk) disable iff (!rst_n)
                   busy |-> round >= RK_IDX_W'(1) && round <= RK_IDX_W'(NR))
    else $error("aes_core: round counter out of range");

endmodule
