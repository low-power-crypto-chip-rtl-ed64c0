// tb_aes_shift_rows: ShiftRows and InvShiftRows on a FIPS-197 state, on a
// state of distinct byte values (so every byte position is traced), and on
// random states against the reference model.
module tb_aes_shift_rows;
  import aes_ref_pkg::*;

  logic [127:0] s_in, s_fwd, s_inv, s_back;
  int checks = 0, failures = 0;

  aes_shift_rows #(.INVERSE(1'b0)) dut_fwd (.state_in(s_in),  .state_out(s_fwd));
  aes_shift_rows #(.INVERSE(1'b1)) dut_inv (.state_in(s_in),  .state_out(s_inv));
  aes_shift_rows #(.INVERSE(1'b1)) dut_bak (.state_in(s_fwd), .state_out(s_back));

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
    s_in = 128'hd42711aee0bf98f1b8b45de51e415230; #1;
    check("FIPS round 1", s_fwd, 128'hd4bf5d30e0b452aeb84111f11e2798e5);
    // bytes 00..0f: row r of column c holds 4c+r
    s_in = 128'h000102030405060708090a0b0c0d0e0f; #1;
    check("index map", s_fwd, 128'h00050a0f04090e03080d02070c01060b);
    check("index map inv", s_inv, 128'h000d0a0704010e0b0805020f0c090603);
    for (int i = 0; i < 300; i++) begin
      s_in = rand128(); #1;
      check("ShiftRows", s_fwd, ref_shift_rows(s_in, 0));
      check("InvShiftRows", s_inv, ref_shift_rows(s_in, 1));
      check("round trip", s_back, s_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
