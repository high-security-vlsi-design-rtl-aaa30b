// tb_mask_rng: checks that the generator starts at its seed after reset,
// that the state is never zero, that it first returns to the seed after
// exactly 65535 steps (maximal length), that all 256 values of the low byte
// occur, and that every step follows the bit equations of a right-shifting
// Galois LFSR with taps at bits 15, 13, 12 and 10.
module tb_mask_rng;
  logic clk = 0, rst_n = 0;
  logic [15:0] rnd;
  int checks = 0, failures = 0;
  bit seen [256];
  int period = 0, nseen = 0, bad_steps = 0;
  logic [15:0] prev;

  mask_rng #(.SEED(16'h1234)) dut (.clk, .rst_n, .rnd);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    checks++;
    if (rnd !== 16'h1234) failures++;
    rst_n = 1;
    @(negedge clk);
    do begin
      if (rnd == 16'h0) failures++;
      if (!seen[rnd[7:0]]) begin seen[rnd[7:0]] = 1; nseen++; end
      period++;
      prev = rnd;
      @(negedge clk);
      for (int i = 0; i < 15; i++)
        if (rnd[i] !== (prev[i+1] ^ ((i == 13 || i == 12 || i == 10) ? prev[0] : 1'b0))) bad_steps++;
      if (rnd[15] !== prev[0]) bad_steps++;
    end while (rnd != 16'h1234 && period < 70000);
    checks += 3;
    if (bad_steps != 0) begin failures++; $display("FAIL %0d bad step bits", bad_steps); end
    if (period + 1 != 65535) begin failures++; $display("FAIL period %0d", period + 1); end
    if (nseen != 256) begin failures++; $display("FAIL only %0d masks seen", nseen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
