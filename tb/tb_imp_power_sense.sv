// tb_imp_power_sense: checks IMP relay sensing. Each change of the relay
// level, either way, must show on INBUF bit 12 two cycles later (the
// synchroniser), make one exclusive-OR pulse of PULSE_CYCLES cycles, and set
// the power flag; the clear line resets the flag; during a clear the pulse
// sets the flag only while it lasts; a steady level makes no pulse.
module tb_imp_power_sense;
  localparam int unsigned PW = 3;
  logic clk = 0, rst_n = 0, imp_relay_open = 1, clear = 0;
  logic imp_pwr_off, change_pulse, pwr_ff;
  int checks = 0, failures = 0;
  int pulses = 0;

  imp_power_sense dut (.*);

  always #50 clk = ~clk;
  always_ff @(posedge clk) if (rst_n && change_pulse) pulses <= pulses + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic flip_and_check();
    int w;
    int p0;
    p0 = pulses;
    @(negedge clk) imp_relay_open = !imp_relay_open;
    @(negedge clk);
    check(imp_pwr_off != imp_relay_open, "not yet through the synchroniser");
    @(negedge clk);
    check(imp_pwr_off == imp_relay_open, "status after two cycles");
    w = 0;
    while (change_pulse) begin w++; @(negedge clk); end
    check(w == PW, $sformatf("pulse %0d cycles expected %0d", w, PW));
    check(pwr_ff, "flag set by change");
    check(pulses == p0 + PW, "one pulse per change");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    check(!pwr_ff && !change_pulse && imp_pwr_off, "power-up with IMP off: no change");
    for (int n = 0; n < 20; n++) begin
      flip_and_check();
      repeat ($urandom_range(0, 20)) @(negedge clk);
      check(pwr_ff, "flag held");
      @(negedge clk) clear = 1; @(negedge clk) clear = 0;
      check(!pwr_ff, "clear resets flag");
    end
    // change during clear: flag set while the pulse lasts, then cleared
    clear = 1;
    @(negedge clk) imp_relay_open = !imp_relay_open;
    repeat (3) @(negedge clk);
    check(pwr_ff && change_pulse, "pulse wins over clear");
    repeat (PW + 1) @(negedge clk);
    check(!pwr_ff, "clear outlasting the pulse empties the flag");
    clear = 0;
    // a change right at the end of a clear is kept
    imp_relay_open = !imp_relay_open;
    repeat (3) @(negedge clk);
    clear = 1; @(negedge clk); clear = 0;
    repeat (PW) @(negedge clk);
    check(pwr_ff, "change overlapping the end of clear sets flag");
    @(negedge clk) clear = 1; @(negedge clk) clear = 0;
    repeat (30) @(negedge clk);
    check(!pwr_ff, "steady level: no new flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
