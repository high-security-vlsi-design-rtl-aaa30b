// tb_control_unit: runs the sequencer through two encryptions and checks
// the schedule against the phase plan: done 377 cycles after start, the
// number of cycles each clock enable is open (state 16+9*20+16, Mix-Columns
// 10*20, key 16+10*16+10*16, RCON 11), 11 ShiftRows strobes, 16 output
// strobes, Mix-Columns bypassed only in the last round (cycles 357..376), no state or
// Mix-Columns clock during key expansion, and start ignored while busy.
module tb_control_unit;
  import aes_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, load_phase, key_phase, ce_state, state_sr, ce_mc, mc_bypass;
  logic ce_key, ce_rcon, rcon_init, out_valid;
  logic [3:0] byte_idx, key_j;
  logic [1:0] mc_idx;
  key_mode_e key_mode;
  int checks = 0, failures = 0;
  int n_state, n_mc, n_key, n_rcon, n_sr, n_out, n_bypass_mc, n_bad, cyc;

  control_unit dut (.clk, .rst_n, .start, .busy, .done, .byte_idx, .load_phase, .key_phase,
                    .ce_state, .state_sr, .ce_mc, .mc_idx, .mc_bypass, .ce_key, .key_mode,
                    .key_j, .ce_rcon, .rcon_init, .out_valid);

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
      n_bypass_mc = 0; n_bad = 0; cyc = 1;
      while (!done) begin
        if (cyc == 5) start = 1; else start = 0;
        n_state += int'(ce_state); n_mc += int'(ce_mc); n_key += int'(ce_key);
        n_rcon += int'(ce_rcon); n_sr += int'(state_sr); n_out += int'(out_valid);
        n_bypass_mc += int'(ce_mc && mc_bypass && cyc >= 357);
        if (ce_mc && mc_bypass && cyc < 357) n_bad++;
        if (key_phase && (ce_state || ce_mc)) n_bad++;
        if (ce_mc && mc_idx != 2'(byte_idx)) n_bad++;
        @(negedge clk); cyc++;
      end
      chk(cyc == 377, $sformatf("done at cycle %0d", cyc));
      chk(n_state == 16 + 9*20 + 16, $sformatf("state clock cycles %0d", n_state));
      chk(n_mc == 200, $sformatf("mc clock cycles %0d", n_mc));
      chk(n_key == 16 + 160 + 160, $sformatf("key clock cycles %0d", n_key));
      chk(n_rcon == 11, $sformatf("rcon clock cycles %0d", n_rcon));
      chk(n_sr == 11, $sformatf("shiftrows strobes %0d", n_sr));
      chk(n_out == 16, $sformatf("output strobes %0d", n_out));
      chk(n_bypass_mc == 20, $sformatf("bypassed mc cycles %0d", n_bypass_mc));
      chk(n_bad == 0, "state/mc clocked in key expansion, idx mismatch or early bypass");
      @(negedge clk);
      chk(!busy && !done, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
