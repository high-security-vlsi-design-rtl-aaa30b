// tb_key_register: loads a random cipher key, then for rounds 1..10 runs a
// 16-cycle expansion (with a reference S-box answering Out 2 and the
// testbench supplying the round constant) followed by a 16-cycle rotation,
// checking that Out 1 presents the reference round key byte by byte.
module tb_key_register;
  import aes_ref_pkg::*;
  import aes_pkg::key_mode_e;
  import aes_pkg::KEY_LOAD;
  import aes_pkg::KEY_EXPAND;
  import aes_pkg::KEY_ROTATE;
  logic clk = 0;
  key_mode_e mode = KEY_LOAD;
  logic [3:0] j = 0;
  logic [7:0] key_in = 0, sbox_out, rcon = 0, out1, out2;
  int checks = 0, failures = 0;

  key_register dut (.clk, .mode, .j, .key_in, .sbox_out, .rcon, .out1, .out2);

  assign sbox_out = sbox(out2);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] key, rk [11];
    logic [7:0] rc;
    for (int n = 0; n < 4; n++) begin
      key = (n == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c
                     : {$urandom, $urandom, $urandom, $urandom};
      expand(key, rk);
      for (int i = 0; i < 16; i++) begin
        @(negedge clk); mode = KEY_LOAD; key_in = key[127 - 8*i -: 8];
      end
      rc = 8'h01;
      for (int r = 1; r <= 10; r++) begin
        for (int i = 0; i < 16; i++) begin
          @(negedge clk); mode = KEY_EXPAND; j = 4'(i); rcon = rc;
        end
        rc = mul(rc, 8'h02);
        for (int i = 0; i < 16; i++) begin
          @(negedge clk);
          checks++;
          if (out1 !== rk[r][127 - 8*i -: 8]) begin
            failures++;
            $display("FAIL round %0d byte %0d got %h exp %h", r, i, out1, rk[r][127 - 8*i -: 8]);
          end
          mode = KEY_ROTATE; j = 4'(i);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
