// tb_aes_key_expansion: key schedule for 128-, 192- and 256-bit keys.
// Three instances expand the FIPS-197 Appendix A keys and random keys; every
// round key read back through rk_index is compared with the reference model,
// the last round keys also with the published values, and the number of
// clocks from key_load to key_ready must be 4*(Nr+1)-Nk.
module tb_aes_key_expansion;
  import aes_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         load128, load192, load256;
  logic [127:0] key128;
  logic [191:0] key192;
  logic [255:0] key256;
  logic         rdy128, rdy192, rdy256, busy128, busy192, busy256;
  logic [3:0]   idx;
  logic [127:0] rk128, rk192, rk256;

  aes_key_expansion dut128 (.clk, .rst_n, .key_load(load128), .key(key128), .key_ready(rdy128),
                            .busy(busy128), .rk_index(idx), .round_key(rk128));
  aes_key_expansion #(.KEY_BITS(192)) dut192 (.clk, .rst_n, .key_load(load192), .key(key192),
                            .key_ready(rdy192), .busy(busy192), .rk_index(idx), .round_key(rk192));
  aes_key_expansion #(.KEY_BITS(256)) dut256 (.clk, .rst_n, .key_load(load256), .key(key256),
                            .key_ready(rdy256), .busy(busy256), .rk_index(idx), .round_key(rk256));

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  // Load a key into the instance for nk, wait for key_ready, check the
  // cycle count and all round keys.
  task automatic run(int nk, logic [255:0] key);
    logic [31:0] w [60];
    int cycles;
    logic [127:0] got;
    ref_expand(key, nk, w);
    @(negedge clk);
    key128 = key[255:128]; key192 = key[255:64]; key256 = key;
    load128 = (nk == 4); load192 = (nk == 6); load256 = (nk == 8);
    @(negedge clk);
    load128 = 0; load192 = 0; load256 = 0;
    cycles = 1;
    checks++;
    if ((nk == 4 && rdy128) || (nk == 6 && rdy192) || (nk == 8 && rdy256)) begin
      failures++;
      $display("FAIL key_ready still high after key_load");
    end
    while (!((nk == 4 && rdy128) || (nk == 6 && rdy192) || (nk == 8 && rdy256))) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != 4 * (nk + 7) - nk + 1) begin
      failures++;
      $display("FAIL nk=%0d: key_ready after %0d clocks, expected %0d", nk, cycles, 4*(nk+7)-nk+1);
    end
    for (int r = 0; r <= nk + 6; r++) begin
      idx = 4'(r); #1;
      got = (nk == 4) ? rk128 : (nk == 6) ? rk192 : rk256;
      check($sformatf("nk=%0d round key %0d", nk, r), got, ref_round_key(w, r));
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load128 = 0; load192 = 0; load256 = 0; idx = 0;
    key128 = '0; key192 = '0; key256 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (rdy128 || rdy192 || rdy256) begin failures++; $display("FAIL key_ready after reset"); end

    run(4, {128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0});
    idx = 4'd10; #1;
    check("FIPS A.1 round key 10", rk128, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
    run(6, {192'h8e73b0f7da0e6452c810f32b809079e562f8ead2522c6b7b, 64'h0});
    idx = 4'd12; #1;
    check("FIPS A.2 round key 12", rk192, 128'he98ba06f448c773c8ecc720401002202);
    run(8, 256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4);
    idx = 4'd14; #1;
    check("FIPS A.3 round key 14", rk256, 128'hfe4890d1e6188d0b046df344706c631e);

    for (int i = 0; i < 6; i++) begin
      run(4, {rand128(), 128'h0});
      run(6, {rand128(), rand128()} & {192'h0 - 1, 64'h0});
      run(8, {rand128(), rand128()});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
