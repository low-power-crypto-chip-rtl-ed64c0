// tb_aes_mix_columns: MixColumns and InvMixColumns on published column
// vectors and a FIPS-197 state, and on random states against the reference
// model; the inverse must undo the forward transform.
module tb_aes_mix_columns;
  import aes_ref_pkg::*;

  logic [127:0] s_in, s_fwd, s_inv, s_back;
  int checks = 0, failures = 0;

  aes_mix_columns #(.INVERSE(1'b0)) dut_fwd (.state_in(s_in),  .state_out(s_fwd));
  aes_mix_columns #(.INVERSE(1'b1)) dut_inv (.state_in(s_in),  .state_out(s_inv));
  aes_mix_columns #(.INVERSE(1'b1)) dut_bak (.state_in(s_fwd), .state_out(s_back));

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
    s_in = 128'hd4bf5d30e0b452aeb84111f11e2798e5; #1;
    check("FIPS round 1", s_fwd, 128'h046681e5e0cb199a48f8d37a2806264c);
    s_in = 128'hdb135345f20a225c01010101c6c6c6c6; #1;
    check("columns", s_fwd, 128'h8e4da1bc9fdc589d01010101c6c6c6c6);
    s_in = 128'h8e4da1bc9fdc589d01010101c6c6c6c6; #1;
    check("columns inv", s_inv, 128'hdb135345f20a225c01010101c6c6c6c6);
    for (int i = 0; i < 300; i++) begin
      s_in = rand128(); #1;
      check("MixColumns", s_fwd, ref_mix_columns(s_in, 0));
      check("InvMixColumns", s_inv, ref_mix_columns(s_in, 1));
      check("round trip", s_back, s_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
