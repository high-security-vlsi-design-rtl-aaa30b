// tb_aes_encrypt: self-checking test of the byte-serial AES-128 core.
//
// Runs the two FIPS-197 example vectors and random key/plaintext/mask
// triples. The core is given plaintext XOR {16{mask}} and must return the
// reference ciphertext XOR {16{mask}}, 377 cycles after ld. It also checks
// that ld while busy is ignored and that busy falls after done.
module tb_aes_encrypt;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0, ld = 0, done, busy;
  logic [127:0] key_in, text_in, text_out;
  logic [7:0] mask;
  int checks = 0, failures = 0;
  int cycles = 0;

  aes_encrypt dut (.clk, .rst_n, .ld, .key_in, .text_in, .mask, .text_out, .done, .busy);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [127:0] k, input logic [127:0] p, input logic [7:0] m,
                     input logic [127:0] expect_ct);
    int t0, lat;
    @(negedge clk);
    key_in = k; text_in = p ^ {16{m}}; mask = m; ld = 1;
    @(negedge clk);
    ld = 0;
    t0 = cycles;
    // a second ld while busy must be ignored
    @(negedge clk); ld = 1; @(negedge clk); ld = 0;
    while (!done) @(negedge clk);
    lat = cycles - t0 + 1;
    checks++;
    if ((text_out ^ {16{m}}) !== expect_ct) begin
      failures++;
      $display("FAIL ct key=%h pt=%h m=%h got=%h exp=%h", k, p, m, text_out ^ {16{m}}, expect_ct);
    end
    checks++;
    if (lat != 377) begin
      failures++;
      $display("FAIL latency %0d (expected 377)", lat);
    end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
  endtask

  initial begin
    logic [127:0] k, p;
    key_in = 0; text_in = 0; mask = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, 8'h00,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734, 8'h5a,
        128'h3925841d02dc09fbdc118597196a0b32);
    for (int n = 0; n < 20; n++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      run(k, p, 8'($urandom), encrypt(k, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
