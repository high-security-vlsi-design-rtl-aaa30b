// tb_dec_sub_bytes: checks both directions of the shared S-box for all 256
// inputs against the reference S-box and inverse S-box.
module tb_dec_sub_bytes;
  import aes_ref_pkg::*;
  logic [7:0] din, dout;
  logic inv;
  int checks = 0, failures = 0;

  dec_sub_bytes dut (.din, .inv, .dout);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 2; d++)
      for (int x = 0; x < 256; x++) begin
        inv = 1'(d); din = 8'(x);
        #1;
        checks++;
        if (dout !== (d ? inv_sbox(8'(x)) : sbox(8'(x)))) begin
          failures++;
          $display("FAIL inv=%0d x=%h got=%h", d, x, dout);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
