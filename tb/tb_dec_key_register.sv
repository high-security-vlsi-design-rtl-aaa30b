// tb_dec_key_register: loads a cipher key, steps the schedule forward ten
// times (checking each round key on Out 1 during a rotation), then steps it
// back ten times, checking round keys 9 down to 0. A reference S-box
// answers Out 2 and the testbench supplies the round constants.
module tb_dec_key_register;
  import aes_ref_pkg::*;
  import aes_pkg::key_mode_e;
  import aes_pkg::KEY_LOAD;
  import aes_pkg::KEY_EXPAND;
  import aes_pkg::KEY_ROTATE;
  logic clk = 0, inverse = 0;
  key_mode_e mode = KEY_LOAD;
  logic [3:0] j = 0;
  logic [7:0] key_in = 0, sbox_out, rcon = 0, out1, out2;
  int checks = 0, failures = 0;
  logic [7:0] rcs [11] = '{8'h00, 8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};

  dec_key_register dut (.clk, .mode, .inverse, .j, .key_in, .sbox_out, .rcon, .out1, .out2);

  assign sbox_out = sbox(out2);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input bit back, input logic [7:0] rc);
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); mode = KEY_EXPAND; inverse = back; j = 4'(i); rcon = rc;
    end
  endtask

  task automatic check_key(input logic [127:0] exp_k, input int r);
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      checks++;
      if (out1 !== exp_k[127 - 8*i -: 8]) begin
        failures++;
        $display("FAIL key %0d byte %0d got %h exp %h", r, i, out1, exp_k[127 - 8*i -: 8]);
      end
      mode = KEY_ROTATE; inverse = 0; j = 4'(i);
    end
  endtask

  initial begin
    logic [127:0] key, rk [11];
    for (int n = 0; n < 4; n++) begin
      key = (n == 0) ? 128'h000102030405060708090a0b0c0d0e0f
                     : {$urandom, $urandom, $urandom, $urandom};
      expand(key, rk);
      for (int i = 0; i < 16; i++) begin
        @(negedge clk); mode = KEY_LOAD; key_in = key[127 - 8*i -: 8];
      end
      for (int r = 1; r <= 10; r++) begin
        step(0, rcs[r]);
        check_key(rk[r], r);
      end
      for (int r = 9; r >= 0; r--) begin
        step(1, rcs[r+1]);
        check_key(rk[r], r);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
