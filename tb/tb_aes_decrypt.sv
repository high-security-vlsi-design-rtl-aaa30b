// tb_aes_decrypt: decrypts the FIPS-197 example ciphertexts and random
// ciphertexts, comparing with the reference inverse cipher, and checks
// that done comes 553 cycles after ld and that the inputs are not read
// after the ciphertext load phase.
module tb_aes_decrypt;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, ld = 0, done, busy;
  logic [127:0] key_in = 0, text_in = 0, text_out;
  int checks = 0, failures = 0, cycles = 0;

  aes_decrypt dut (.clk, .rst_n, .ld, .key_in, .text_in, .text_out, .done, .busy);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [127:0] k, input logic [127:0] c, input logic [127:0] expect_pt);
    int t0;
    @(negedge clk);
    key_in = k; text_in = c; ld = 1;
    @(negedge clk); ld = 0; t0 = cycles;
    repeat (192) @(negedge clk);
    key_in = ~k; text_in = ~c;  // inputs are no longer read after cycle 192
    while (!done) @(negedge clk);
    checks += 2;
    if (text_out !== expect_pt) begin
      failures++;
      $display("FAIL key=%h ct=%h got=%h exp=%h", k, c, text_out, expect_pt);
    end
    if (cycles - t0 + 1 != 553) begin failures++; $display("FAIL latency %0d", cycles - t0 + 1); end
  endtask

  initial begin
    logic [127:0] k, p;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a,
        128'h00112233445566778899aabbccddeeff);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3925841d02dc09fbdc118597196a0b32,
        128'h3243f6a8885a308d313198a2e0370734);
    for (int n = 0; n < 50; n++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      run(k, encrypt(k, p), p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
