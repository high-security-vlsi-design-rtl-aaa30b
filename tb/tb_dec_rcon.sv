// tb_dec_rcon: loads 01, steps forward to 36 and back to 01, comparing
// with the AES round constants in both directions.
module tb_dec_rcon;
  logic clk = 0, init = 1, back = 0;
  logic [7:0] rcon_o;
  int checks = 0, failures = 0;
  logic [7:0] exp_rc [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};

  dec_rcon dut (.clk, .init, .back, .rcon_o);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2; n++) begin
      init = 1; back = 0;
      #5 clk = 1; #5 clk = 0;
      init = 0;
      for (int i = 0; i < 10; i++) begin
        checks++;
        if (rcon_o !== exp_rc[i]) begin failures++; $display("FAIL fwd %0d got %h", i, rcon_o); end
        if (i < 9) begin #5 clk = 1; #5 clk = 0; end
      end
      back = 1;
      for (int i = 9; i >= 0; i--) begin
        checks++;
        if (rcon_o !== exp_rc[i]) begin failures++; $display("FAIL back %0d got %h", i, rcon_o); end
        #5 clk = 1; #5 clk = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
