// tb_mix_columns: streams random columns through the byte-serial
// MixColumns, one byte per cycle without gaps, and checks that every
// output byte equals the reference MixColumns result exactly 4 cycles
// after its input byte. Also runs the FIPS-197 column db 13 53 45 ->
// 8e 4d a1 bc and checks bypass mode as a pure 4-cycle delay.
module tb_mix_columns;
  import aes_ref_pkg::*;
  logic clk = 0, bypass = 0;
  logic [1:0] idx = 0;
  logic [7:0] din = 0, dout;
  int checks = 0, failures = 0;
  localparam int NCOL = 40;
  logic [7:0] in_b [4*NCOL + 4];
  logic [7:0] exp_b [4*NCOL + 4];

  mix_columns dut (.clk, .idx, .bypass, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic stream(input bit byp);
    st_t s, o;
    for (int c = 0; c < NCOL; c++) begin
      for (int r = 0; r < 4; r++) begin
        in_b[4*c + r] = (c == 0 && !byp) ? (r == 0 ? 8'hdb : r == 1 ? 8'h13 : r == 2 ? 8'h53 : 8'h45)
                                         : 8'($urandom);
        s[r][0] = in_b[4*c + r];
      end
      o = byp ? s : mix(s, 8'h02, 8'h03, 8'h01, 8'h01);
      for (int r = 0; r < 4; r++) exp_b[4*c + r] = o[r][0];
    end
    for (int i = 0; i < 4; i++) in_b[4*NCOL + i] = 0;
    bypass = byp;
    for (int t = 0; t < 4*NCOL + 4; t++) begin
      @(negedge clk);
      if (t >= 4) begin
        checks++;
        if (dout !== exp_b[t-4]) begin
          failures++;
          $display("FAIL byp=%0d byte %0d got %h exp %h", byp, t-4, dout, exp_b[t-4]);
        end
      end
      din = in_b[t]; idx = 2'(t % 4);
    end
  endtask

  initial begin
    stream(0);
    checks++;
    if (!(exp_b[0] == 8'h8e && exp_b[1] == 8'h4d && exp_b[2] == 8'ha1 && exp_b[3] == 8'hbc)) failures++;
    stream(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
