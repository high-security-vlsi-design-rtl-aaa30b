// tb_nano_aes_encrypt: encrypts the FIPS-197 vectors and random blocks
// through the masked, clock-gated encryptor and compares with the
// reference cipher. In every other block the clock enable is dropped for
// random stretches; the latency must then be 377 enabled cycles plus the
// stalled ones. The plaintext and key inputs are changed right after the
// 16 load cycles to show they are no longer needed, and the previous
// ciphertext must still be on text_out 300 cycles into the next block.
module tb_nano_aes_encrypt;
  import aes_ref_pkg::*;
  logic clk = 0, en = 1, rst_n = 0, ld = 0, done, busy;
  logic [127:0] key = 0, text_in = 0, text_out;
  int checks = 0, failures = 0;
  logic [127:0] prev_ct = 0;
  bit have_prev = 0;

  nano_aes_encrypt dut (.clk, .en, .rst_n, .ld, .key, .text_in, .text_out, .done, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [127:0] k, input logic [127:0] p, input logic [127:0] expect_ct,
                     input bit stall);
    int cyc = 0, stalled = 0;
    @(negedge clk);
    en = 1; key = k; text_in = p; ld = 1;
    @(negedge clk); ld = 0;
    while (!done) begin
      cyc++;
      if (en) begin
        if (cyc == 17 + stalled) begin key = ~k; text_in = ~p; end
        if (cyc == 300 + stalled && have_prev) begin
          checks++;
          if (text_out !== prev_ct) begin
            failures++;
            $display("FAIL previous ciphertext lost during the next block: %h", text_out);
          end
        end
      end else stalled++;
      en = stall ? ($urandom_range(0, 3) != 0) : 1'b1;
      @(negedge clk);
    end
    cyc++;
    checks += 2;
    if (text_out !== expect_ct) begin
      failures++;
      $display("FAIL key=%h pt=%h got=%h exp=%h", k, p, text_out, expect_ct);
    end
    if (cyc - stalled != 377) begin
      failures++;
      $display("FAIL latency %0d with %0d stalled cycles", cyc, stalled);
    end
    en = 1;
    prev_ct = expect_ct; have_prev = 1;
  endtask

  initial begin
    logic [127:0] k, p;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a, 0);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32, 1);
    for (int n = 0; n < 16; n++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      run(k, p, encrypt(k, p), n[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
