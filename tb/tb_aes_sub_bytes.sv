// tb_aes_sub_bytes: SubBytes and InvSubBytes on a FIPS-197 state and on
// random states, against the reference model; also checks that the inverse
// undoes the forward transform.
module tb_aes_sub_bytes;
  import aes_ref_pkg::*;

  logic [127:0] s_in, s_fwd, s_inv, s_back;
  int checks = 0, failures = 0;

  aes_sub_bytes #(.INVERSE(1'b0)) dut_fwd (.state_in(s_in),  .state_out(s_fwd));
  aes_sub_bytes #(.INVERSE(1'b1)) dut_inv (.state_in(s_in),  .state_out(s_inv));
  aes_sub_bytes #(.INVERSE(1'b1)) dut_bak (.state_in(s_fwd), .state_out(s_back));

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
    // FIPS-197 Appendix B, round 1: start of round -> after SubBytes
    s_in = 128'h193de3bea0f4e22b9ac68d2ae9f84808; #1;
    check("FIPS round 1", s_fwd, 128'hd42711aee0bf98f1b8b45de51e415230);
    for (int i = 0; i < 300; i++) begin
      s_in = rand128(); #1;
      check("SubBytes", s_fwd, ref_sub_bytes(s_in, 0));
      check("InvSubBytes", s_inv, ref_sub_bytes(s_in, 1));
      check("round trip", s_back, s_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
