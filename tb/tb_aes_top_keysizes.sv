// tb_aes_top_keysizes: the crypto-chip built for 192- and 256-bit keys
// (Nr = 12 and 14). Each instance expands the FIPS-197 Appendix C key,
// encrypts and decrypts the Appendix C block, then random blocks under
// random keys, all against the reference model, and checks the latency of
// Nr+1 clocks and the expansion time of 4*(Nr+1)-Nk clocks.
module tb_aes_top_keysizes;
  import aes_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         kl192, kr192, iv192, ir192, id192, ov192, busy192;
  logic         kl256, kr256, iv256, ir256, id256, ov256, busy256;
  logic [191:0] key192;
  logic [255:0] key256;
  logic [127:0] in_data, od192, od256;
  logic         out_ready;

  aes_top #(.KEY_BITS(192)) dut192 (.clk, .rst_n, .key_load(kl192), .key(key192), .key_ready(kr192),
    .in_valid(iv192), .in_ready(ir192), .in_decrypt(id192), .in_data, .out_valid(ov192),
    .out_ready, .out_data(od192), .busy(busy192));
  aes_top #(.KEY_BITS(256)) dut256 (.clk, .rst_n, .key_load(kl256), .key(key256), .key_ready(kr256),
    .in_valid(iv256), .in_ready(ir256), .in_decrypt(id256), .in_data, .out_valid(ov256),
    .out_ready, .out_data(od256), .busy(busy256));

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  task automatic expect_true(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic load_key(int nk, logic [255:0] k);
    int cycles;
    @(negedge clk);
    if (nk == 6) begin key192 = k[255:64]; kl192 = 1; end
    else         begin key256 = k;         kl256 = 1; end
    @(negedge clk);
    kl192 = 0; kl256 = 0;
    cycles = 1;
    while (!((nk == 6) ? kr192 : kr256)) begin @(negedge clk); cycles++; end
    expect_true($sformatf("nk=%0d expansion took %0d clocks", nk, cycles), cycles == 4*(nk+7) - nk + 1);
  endtask

  task automatic block(int nk, logic [255:0] k, logic dec, logic [127:0] data);
    int lat;
    logic [127:0] exp, got;
    exp = dec ? ref_decrypt(k, nk, data) : ref_encrypt(k, nk, data);
    @(negedge clk);
    in_data = data;
    if (nk == 6) begin iv192 = 1; id192 = dec; end else begin iv256 = 1; id256 = dec; end
    expect_true("in_ready", (nk == 6) ? ir192 : ir256);
    @(negedge clk);
    iv192 = 0; iv256 = 0; in_data = rand128();
    lat = 1;
    while (!((nk == 6) ? ov192 : ov256)) begin @(negedge clk); lat++; end
    expect_true($sformatf("nk=%0d latency %0d", nk, lat), lat == nk + 7);
    got = (nk == 6) ? od192 : od256;
    check($sformatf("nk=%0d %s", nk, dec ? "decrypt" : "encrypt"), got, exp);
    @(negedge clk);
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] k;
    kl192 = 0; kl256 = 0; iv192 = 0; iv256 = 0; id192 = 0; id256 = 0;
    key192 = '0; key256 = '0; in_data = '0; out_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // FIPS-197 Appendix C.2 and C.3
    k = {192'h000102030405060708090a0b0c0d0e0f1011121314151617, 64'h0};
    load_key(6, k);
    block(6, k, 0, 128'h00112233445566778899aabbccddeeff);
    check("FIPS C.2 ciphertext", od192, 128'hdda97ca4864cdfe06eaf70a0ec0d7191);
    block(6, k, 1, 128'hdda97ca4864cdfe06eaf70a0ec0d7191);
    check("FIPS C.2 plaintext", od192, 128'h00112233445566778899aabbccddeeff);
    k = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
    load_key(8, k);
    block(8, k, 0, 128'h00112233445566778899aabbccddeeff);
    check("FIPS C.3 ciphertext", od256, 128'h8ea2b7ca516745bfeafc49904b496089);
    block(8, k, 1, 128'h8ea2b7ca516745bfeafc49904b496089);
    check("FIPS C.3 plaintext", od256, 128'h00112233445566778899aabbccddeeff);

    for (int j = 0; j < 4; j++) begin
      k = {rand128(), rand128()} & {192'h0 - 1, 64'h0};
      load_key(6, k);
      for (int i = 0; i < 6; i++) block(6, k, 1'(i % 2), rand128());
      k = {rand128(), rand128()};
      load_key(8, k);
      for (int i = 0; i < 6; i++) block(8, k, 1'(i % 2), rand128());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
