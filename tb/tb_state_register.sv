// tb_state_register: shifts 16 random bytes in, with ShiftRows on the last
// shift, and reads them back out; compares with the ShiftRows permutation
// (row r rotated left by r) worked out in the testbench. Also checks a
// plain 16-byte shift without ShiftRows and that shift=0 holds the data.
module tb_state_register;
  logic clk = 0, shift = 0, shift_rows = 0;
  logic [7:0] din = 0, dout;
  int checks = 0, failures = 0;
  logic [7:0] in_b [16];
  logic [7:0] exp_b [16];

  state_register dut (.clk, .shift, .shift_rows, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input bit sr);
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      in_b[i] = 8'($urandom);
      din = in_b[i]; shift = 1; shift_rows = sr && (i == 15);
    end
    @(negedge clk);
    shift = 0; shift_rows = 0;
  endtask

  task automatic unload();
    // hold for a few cycles first
    repeat (3) @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (dout !== exp_b[i]) begin
        failures++;
        $display("FAIL byte %0d got %h exp %h", i, dout, exp_b[i]);
      end
      shift = 1; din = 0;
      @(negedge clk);
    end
    shift = 0;
  endtask

  initial begin
    for (int n = 0; n < 8; n++) begin
      load(1);
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++) exp_b[4*c + r] = in_b[4*((c + r) % 4) + r];
      unload();
      load(0);
      for (int i = 0; i < 16; i++) exp_b[i] = in_b[i];
      unload();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
