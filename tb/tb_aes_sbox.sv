// tb_aes_sbox: checks the forward and inverse S-box tables over all 256
// inputs against the reference model and a few published FIPS-197 entries.
module tb_aes_sbox;
  import aes_ref_pkg::*;

  logic [7:0] in_byte, fwd, inv;
  int checks = 0, failures = 0;

  aes_sbox #(.INVERSE(1'b0)) dut_fwd (.in_byte(in_byte), .out_byte(fwd));
  aes_sbox #(.INVERSE(1'b1)) dut_inv (.in_byte(in_byte), .out_byte(inv));

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
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
    // Published table entries
    in_byte = 8'h00; #1 check("S(00)", fwd, 8'h63);
    in_byte = 8'h01; #1 check("S(01)", fwd, 8'h7c);
    in_byte = 8'h53; #1 check("S(53)", fwd, 8'hed);
    in_byte = 8'hff; #1 check("S(ff)", fwd, 8'h16);
    in_byte = 8'h63; #1 check("InvS(63)", inv, 8'h00);
    in_byte = 8'hed; #1 check("InvS(ed)", inv, 8'h53);
    for (int x = 0; x < 256; x++) begin
      in_byte = 8'(x);
      #1;
      check($sformatf("S(%02h)", x), fwd, ref_sbox(8'(x)));
      check($sformatf("InvS(%02h)", x), inv, ref_inv_sbox(8'(x)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
