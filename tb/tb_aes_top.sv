// tb_aes_top: end-to-end test of the crypto-chip at its default size
// (AES-128). It loads keys, encrypts and decrypts FIPS-197 known-answer
// blocks and random blocks against the reference model, and drives every
// mechanism of the chip at least once, counting each:
//   key_expansion    a key is expanded (key_load -> key_ready, 4*(Nr+1)-Nk clocks)
//   encrypt/decrypt  blocks of both modes, result Nr+1 clocks after the take
//   wait_for_keys    a block offered while keys are being expanded waits
//   wait_for_core    a block offered while another is in flight waits
//   backpressure     a result held while out_ready is low
//   key_refused      a key_load during the rounds is ignored
//   key_wins         key_load and a block in the same clock: the key is taken
// A mechanism that never happened counts as a failure.
module tb_aes_top;
  import aes_ref_pkg::*;

  localparam int NK = 4;
  localparam int NR = NK + 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_keyexp = 0, n_enc = 0, n_dec = 0, n_wait_keys = 0, n_wait_core = 0;
  int n_backpressure = 0, n_key_refused = 0, n_key_wins = 0;

  logic         key_load, key_ready, in_valid, in_ready, in_decrypt, out_valid, out_ready, busy;
  logic [127:0] key;
  logic [127:0] in_data, out_data;
  logic [255:0] cur_key;

  aes_top dut (.clk, .rst_n, .key_load, .key, .key_ready, .in_valid, .in_ready, .in_decrypt,
               .in_data, .out_valid, .out_ready, .out_data, .busy);

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  task automatic expect_true(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Load a key and wait for the expansion; optionally offer a block meanwhile
  task automatic load_key(logic [127:0] k);
    int cycles;
    @(negedge clk);
    key = k; key_load = 1;
    @(negedge clk);
    key_load = 0; key = rand128();
    cur_key = {k, 128'h0};
    cycles = 1;
    expect_true("key_ready low during expansion", !key_ready);
    while (!key_ready) begin
      @(negedge clk);
      cycles++;
    end
    expect_true($sformatf("key expansion took %0d clocks", cycles), cycles == 4*(NR+1) - NK + 1);
    n_keyexp++;
  endtask

  // Offer a block, wait for its take, then its result. Options: keep a key
  // load attempt during the rounds, hold out_ready low for some clocks.
  task automatic block(logic dec, logic [127:0] data, int stall, bit try_key);
    int lat;
    logic [127:0] exp, held;
    exp = dec ? ref_decrypt(cur_key, NK, data) : ref_encrypt(cur_key, NK, data);
    @(negedge clk);
    in_valid = 1; in_decrypt = dec; in_data = data;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 0; in_data = rand128(); in_decrypt = ~dec;
    lat = 1;
    while (!out_valid) begin
      if (try_key && lat == 3) begin
        key = rand128(); key_load = 1;
      end else begin
        key_load = 0;
      end
      @(negedge clk);
      if (try_key && lat == 3) begin
        expect_true("refused key leaves key_ready high", key_ready);
        n_key_refused++;
      end
      lat++;
    end
    key_load = 0;
    expect_true($sformatf("latency %0d", lat), lat == NR + 1);
    check(dec ? "decrypt" : "encrypt", out_data, exp);
    if (dec) n_dec++; else n_enc++;
    held = out_data;
    out_ready = 0;
    repeat (stall) begin
      @(negedge clk);
      expect_true("result held", out_valid && out_data == held && !in_ready);
    end
    if (stall > 0) n_backpressure++;
    out_ready = 1;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count blocks that had to wait, from the outside
  always @(negedge clk) if (rst_n && in_valid && !in_ready) begin
    if (!key_ready) n_wait_keys++;
    else if (busy || out_valid) n_wait_core++;
  end

  initial begin
    key_load = 0; key = '0; in_valid = 0; in_decrypt = 0; in_data = '0; out_ready = 1;
    cur_key = '0;
    repeat (2) @(negedge clk);
    expect_true("in_ready low in reset", !in_ready && !key_ready);
    rst_n = 1;
    @(negedge clk);
    expect_true("no keys after reset", !key_ready && !in_ready);

    // FIPS-197 Appendix B, with the block already waiting during expansion
    in_valid = 1; in_data = 128'h3243f6a8885a308d313198a2e0370734;
    load_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    block(0, 128'h3243f6a8885a308d313198a2e0370734, 0, 0);
    check("FIPS B ciphertext", out_data, 128'h3925841d02dc09fbdc118597196a0b32);
    block(1, 128'h3925841d02dc09fbdc118597196a0b32, 2, 0);
    check("FIPS B plaintext", out_data, 128'h3243f6a8885a308d313198a2e0370734);

    // FIPS-197 Appendix C.1
    load_key(128'h000102030405060708090a0b0c0d0e0f);
    block(0, 128'h00112233445566778899aabbccddeeff, 0, 1);
    check("FIPS C.1 ciphertext", out_data, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    block(1, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 0, 0);
    check("FIPS C.1 plaintext", out_data, 128'h00112233445566778899aabbccddeeff);

    // A second block offered while the first is in flight waits for it
    @(negedge clk);
    in_valid = 1; in_decrypt = 0; in_data = 128'h00112233445566778899aabbccddeeff;
    @(negedge clk);   // taken
    in_data = 128'h0;
    repeat (3) @(negedge clk);
    expect_true("second block waits", !in_ready);
    in_valid = 0;
    while (!out_valid) @(negedge clk);
    check("in-flight block", out_data, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    @(negedge clk);

    // key_load and a block in the same clock: the key wins
    @(negedge clk);
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c; key_load = 1;
    in_valid = 1; in_decrypt = 0; in_data = 128'h3243f6a8885a308d313198a2e0370734;
    #1 expect_true("block refused in key clock", !in_ready);
    n_key_wins++;
    @(negedge clk);
    key_load = 0;
    cur_key = {128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0};
    while (!key_ready) @(negedge clk);
    n_keyexp++;
    in_valid = 0;
    block(0, 128'h3243f6a8885a308d313198a2e0370734, 0, 0);
    check("block after key change", out_data, 128'h3925841d02dc09fbdc118597196a0b32);

    // Random traffic
    for (int i = 0; i < 40; i++) begin
      if (i % 8 == 0) load_key(rand128());
      block(1'($urandom_range(0, 1)), rand128(), $urandom_range(0, 2), (i % 5 == 2));
    end

    expect_true("mechanism key_expansion", n_keyexp > 0);
    expect_true("mechanism encrypt", n_enc > 0);
    expect_true("mechanism decrypt", n_dec > 0);
    expect_true("mechanism wait_for_keys", n_wait_keys > 0);
    expect_true("mechanism wait_for_core", n_wait_core > 0);
    expect_true("mechanism backpressure", n_backpressure > 0);
    expect_true("mechanism key_refused", n_key_refused > 0);
    expect_true("mechanism key_wins", n_key_wins > 0);
    $display("mechanisms: key_expansion=%0d encrypt=%0d decrypt=%0d wait_for_keys=%0d wait_for_core=%0d backpressure=%0d key_refused=%0d key_wins=%0d",
             n_keyexp, n_enc, n_dec, n_wait_keys, n_wait_core, n_backpressure, n_key_refused, n_key_wins);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
