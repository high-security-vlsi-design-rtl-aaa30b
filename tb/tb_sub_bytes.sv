// tb_sub_bytes: checks the masked S-box for every input byte under several
// masks (including mask 0, the plain S-box) against the reference S-box,
// plus the FIPS-197 examples S(00)=63, S(53)=ed.
module tb_sub_bytes;
  import aes_ref_pkg::*;
  logic [7:0] din, mask, dout;
  int checks = 0, failures = 0;

  sub_bytes dut (.din, .mask, .dout);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] masks [4] = '{8'h00, 8'h01, 8'ha5, 8'hff};

  initial begin
    foreach (masks[mi]) begin
      for (int x = 0; x < 256; x++) begin
        mask = masks[mi];
        din = 8'(x) ^ mask;
        #1;
        checks++;
        if (dout !== (sbox(8'(x)) ^ mask)) begin
          failures++;
          $display("FAIL x=%h m=%h got=%h", x, mask, dout);
        end
      end
    end
    mask = 0; din = 8'h00; #1; checks++; if (dout !== 8'h63) failures++;
    din = 8'h53; #1; checks++; if (dout !== 8'hed) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
