// tb_aes_round: one round in all four variants (encrypt / decrypt, normal /
// final) on random states and keys against the reference model, plus the
// FIPS-197 Appendix B first encryption round.
module tb_aes_round;
  import aes_ref_pkg::*;

  logic [127:0] s_in, rk, s_out;
  logic         dec, fin;
  int checks = 0, failures = 0;

  aes_round dut (.state_in(s_in), .round_key(rk), .decrypt(dec), .final_round(fin), .state_out(s_out));

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  function automatic logic [127:0] model(logic [127:0] s, logic [127:0] k, bit d, bit f);
    if (!d) begin
      s = ref_shift_rows(ref_sub_bytes(s, 0), 0);
      if (!f) s = ref_mix_columns(s, 0);
      return s ^ k;
    end else begin
      s = ref_sub_bytes(ref_shift_rows(s, 1), 1) ^ k;
      if (!f) s = ref_mix_columns(s, 1);
      return s;
    end
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_in = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    rk   = 128'ha0fafe1788542cb123a339392a6c7605;
    dec = 0; fin = 0; #1;
    check("FIPS round 1", s_out, 128'ha49c7ff2689f352b6b5bea43026a5049);
    for (int i = 0; i < 400; i++) begin
      s_in = rand128(); rk = rand128();
      dec = 1'(i % 2); fin = 1'((i / 2) % 2); #1;
      check($sformatf("round dec=%0b final=%0b", dec, fin), s_out, model(s_in, rk, dec, fin));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
