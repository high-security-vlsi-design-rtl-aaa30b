// tb_rcon: loads the first round constant and steps it nine times,
// comparing with the AES round constants 01 02 04 08 10 20 40 80 1b 36.
// Also checks that without a clock edge the value holds.
module tb_rcon;
  logic clk = 0, init = 1;
  logic [7:0] rcon_o;
  int checks = 0, failures = 0;
  logic [7:0] exp_rc [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};

  rcon dut (.clk, .init, .rcon_o);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3; n++) begin
      init = 1;
      #5 clk = 1; #5 clk = 0;
      init = 0;
      for (int i = 0; i < 10; i++) begin
        checks++;
        if (rcon_o !== exp_rc[i]) begin
          failures++;
          $display("FAIL rcon %0d got %h exp %h", i, rcon_o, exp_rc[i]);
        end
        #20;  // no edge: must hold
        checks++;
        if (rcon_o !== exp_rc[i]) failures++;
        #5 clk = 1; #5 clk = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
