// tb_aes_core: the iterative cipher core with its round keys supplied by the
// reference key schedule (a behavioural key store in this testbench). Checks
// FIPS-197 known answers, random encryptions and decryptions, the latency of
// Nr+1 clocks from taking a block to out_valid, that in_ready stays low
// without round keys and while a block is in flight, and that a result is
// held unchanged while out_ready is low.
module tb_aes_core;
  import aes_ref_pkg::*;

  localparam int NR = 10;
  localparam int NK = NR - 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         key_ready, in_valid, in_ready, in_decrypt, out_valid, out_ready, busy;
  logic [127:0] in_data, round_key, out_data;
  logic [3:0]   rk_index;
  logic [31:0]  w [60];
  logic [255:0] cur_key;

  aes_core #(.NR(NR)) dut (.clk, .rst_n, .key_ready, .in_valid, .in_ready, .in_decrypt, .in_data,
                           .rk_index, .round_key, .out_valid, .out_ready, .out_data, .busy);

  // behavioural round-key store
  always_comb round_key = (rk_index <= 4'(NR)) ? ref_round_key(w, int'(rk_index)) : 128'h0;

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  task automatic set_key(logic [255:0] k);
    cur_key = k;
    ref_expand(k, NK, w);
  endtask

  // Send one block, check latency, hold-off and result
  task automatic one_block(logic dec, logic [127:0] data, int stall);
    int lat;
    logic [127:0] exp, held;
    exp = dec ? ref_decrypt(cur_key, NK, data) : ref_encrypt(cur_key, NK, data);
    @(negedge clk);
    in_valid = 1; in_decrypt = dec; in_data = data;
    checks++;
    if (!in_ready) begin failures++; $display("FAIL in_ready low when idle"); end
    @(negedge clk);
    in_valid = 0; in_data = rand128();   // data may change after the take
    lat = 1;
    while (!out_valid) begin
      checks++;
      if (in_ready) begin failures++; $display("FAIL in_ready high while busy"); end
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != NR + 1) begin failures++; $display("FAIL latency %0d expected %0d", lat, NR + 1); end
    check(dec ? "decrypt" : "encrypt", out_data, exp);
    held = out_data;
    out_ready = 0;
    repeat (stall) begin
      @(negedge clk);
      check("held result", out_data, held);
      checks++;
      if (!out_valid || in_ready) begin failures++; $display("FAIL result not held"); end
    end
    out_ready = 1;
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid after hand-over"); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key_ready = 0; in_valid = 0; in_decrypt = 0; in_data = '0; out_ready = 1;
    set_key({128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0});
    repeat (2) @(negedge clk);
    rst_n = 1;
    // no keys: nothing is taken
    in_valid = 1; in_data = 128'h1;
    repeat (3) begin
      @(negedge clk);
      checks++;
      if (in_ready || out_valid) begin failures++; $display("FAIL took block without keys"); end
    end
    in_valid = 0;
    key_ready = 1;
    one_block(0, 128'h3243f6a8885a308d313198a2e0370734, 0);
    set_key({128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0});
    one_block(1, 128'h3925841d02dc09fbdc118597196a0b32, 2);
    set_key({128'h000102030405060708090a0b0c0d0e0f, 128'h0});
    one_block(0, 128'h00112233445566778899aabbccddeeff, 0);
    one_block(1, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1);
    for (int i = 0; i < 60; i++) begin
      if (i % 10 == 0) set_key({rand128(), 128'h0});
      one_block(1'($urandom_range(0, 1)), rand128(), $urandom_range(0, 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
