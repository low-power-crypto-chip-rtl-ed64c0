// tb_aes_add_round_key: AddRoundKey on the FIPS-197 round-1 state and key,
// and on random operands; applying the same key twice must restore the state.
module tb_aes_add_round_key;
  import aes_ref_pkg::*;

  logic [127:0] s_in, rk, s_out, s_back;
  int checks = 0, failures = 0;

  aes_add_round_key dut  (.state_in(s_in),  .round_key(rk), .state_out(s_out));
  aes_add_round_key dut2 (.state_in(s_out), .round_key(rk), .state_out(s_back));

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_in = 128'h046681e5e0cb199a48f8d37a2806264c;
    rk   = 128'ha0fafe1788542cb123a339392a6c7605; #1;
    check("FIPS round 1", s_out, 128'ha49c7ff2689f352b6b5bea43026a5049);
    for (int i = 0; i < 300; i++) begin
      logic [127:0] e;
      s_in = rand128(); rk = rand128(); #1;
      // reference byte by byte
      for (int n = 0; n < 16; n++) e[8*n +: 8] = s_in[8*n +: 8] ^ rk[8*n +: 8];
      check("xor", s_out, e);
      check("twice", s_back, s_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
