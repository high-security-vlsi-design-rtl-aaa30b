// tb_dec_control_unit: runs the decryptor's sequencer twice and checks the
// schedule: done 553 cycles after start, clock-enable cycle counts (state
// 16+9*20+16, InvMixColumns 200, key 16+160+16+160+160, RCON 1+9+10),
// 11 InvShiftRows strobes, 16 output strobes, the inverse S-box only in
// rounds, the backward key mode only in KBACK phases (160 cycles),
// InvMixColumns bypass only in the last round, and start ignored while busy.
module tb_dec_control_unit;
  import aes_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, dload_phase, key_phase, sbox_inv, ce_state, state_sr, ce_mc, mc_bypass;
  logic ce_key, key_inverse, ce_rcon, rcon_init, rcon_back, out_valid;
  logic [3:0] byte_idx, key_j;
  logic [1:0] mc_idx;
  key_mode_e key_mode;
  int checks = 0, failures = 0;
  int n_state, n_mc, n_key, n_rcon, n_sr, n_out, n_inv, n_kinv, n_byp, n_bad, cyc;

  dec_control_unit dut (.clk, .rst_n, .start, .busy, .done, .byte_idx, .dload_phase, .key_phase,
                        .sbox_inv, .ce_state, .state_sr, .ce_mc, .mc_idx, .mc_bypass, .ce_key,
                        .key_mode, .key_inverse, .key_j, .ce_rcon, .rcon_init, .rcon_back,
                        .out_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2; n++) begin
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      n_state = 0; n_mc = 0; n_key = 0; n_rcon = 0; n_sr = 0; n_out = 0;
      n_inv = 0; n_kinv = 0; n_byp = 0; n_bad = 0; cyc = 1;
      while (!done) begin
        start = (cyc == 7);
        n_state += int'(ce_state); n_mc += int'(ce_mc); n_key += int'(ce_key);
        n_rcon += int'(ce_rcon); n_sr += int'(state_sr); n_out += int'(out_valid);
        n_inv += int'(sbox_inv && ce_mc); n_kinv += int'(key_inverse && ce_key);
        n_byp += int'(ce_mc && mc_bypass);
        if (key_phase && (ce_state || ce_mc)) n_bad++;
        if (sbox_inv && key_phase) n_bad++;
        if (ce_mc && mc_bypass && cyc < 533) n_bad++;
        @(negedge clk); cyc++;
      end
      chk(cyc == 553, $sformatf("done at cycle %0d", cyc));
      chk(n_state == 16 + 9*20 + 16, $sformatf("state clock cycles %0d", n_state));
      chk(n_mc == 200, $sformatf("mc clock cycles %0d", n_mc));
      chk(n_key == 16 + 160 + 16 + 160 + 160, $sformatf("key clock cycles %0d", n_key));
      chk(n_rcon == 20, $sformatf("rcon clock cycles %0d", n_rcon));
      chk(n_sr == 11, $sformatf("shiftrows strobes %0d", n_sr));
      chk(n_out == 16, $sformatf("output strobes %0d", n_out));
      chk(n_inv == 200, $sformatf("inverse s-box round cycles %0d", n_inv));
      chk(n_kinv == 160, $sformatf("backward key cycles %0d", n_kinv));
      chk(n_byp == 20, $sformatf("bypass cycles %0d", n_byp));
      chk(n_bad == 0, "state/mc clocked in key phase, inverse s-box in key phase, or early bypass");
      @(negedge clk);
      chk(!busy && !done, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
