// tb_rcv_control: checks the receive handshake controller with TYIB driven
// directly (already synchronous) and a testbench counter standing in for the
// bit counter. Checked: RFNIB only when enabled; the strobe T1+1 cycles after
// TYIB is seen; RFNIB low for at least T2 cycles and until TYIB falls (4-way)
// and after a short TYIB pulse (2-way); RFNIB held low after 8 bits or after
// a last data bit; REQUEST B for each of its three causes and only with
// receive enable; the clear line lasting T3 cycles after the trailing edge
// of the read pulse and ignoring TYIB meanwhile.
module tb_rcv_control;
  localparam int unsigned T1 = 10, T2 = 10, T3 = 10;
  logic clk = 0, rst_n = 0, init = 0, read_pulse = 0, rcv_enable = 0, tyib = 0;
  logic full, ldb_ff = 0, pwr_ff = 0;
  logic rfnib, strobe, clear, int_req_b;
  int cnt;
  int checks = 0, failures = 0;

  rcv_control dut (.*);

  always #50 clk = ~clk;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) cnt <= 0;
    else if (strobe) cnt <= cnt + 1;
  end
  assign full = (cnt >= 8);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // 4-way bit: returns cycles from TYIB high to strobe and RFNIB low time
  task automatic bit4(output int t_strobe, output int t_low, input int hold_extra);
    int c;
    wait (rfnib); @(negedge clk);
    tyib = 1;
    c = 0;
    while (!strobe) begin @(negedge clk); c++; end
    t_strobe = c;
    @(negedge clk);
    check(!rfnib, "RFNIB falls after strobe");
    c = 1;
    repeat (hold_extra) begin @(negedge clk); c++; check(!rfnib, "RFNIB low while TYIB high"); end
    tyib = 0;
    while (!rfnib && c < 100 && !full) begin @(negedge clk); c++; end
    t_low = c;
  endtask

  int ts, tl, w, strobes;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    init = 1; repeat (3) @(negedge clk); init = 0;
    repeat (3) @(negedge clk);
    check(!rfnib, "RFNIB low while disabled");
    rcv_enable = 1; @(negedge clk);
    check(rfnib, "RFNIB high when enabled");
    // 4-way handshake, TYIB held beyond T2
    bit4(ts, tl, 25);
    check(ts == T1 + 1, $sformatf("strobe %0d cycles after TYIB, expected %0d", ts, T1 + 1));
    check(tl >= 26, "RFNIB waits for TYIB to fall");
    // 4-way, TYIB dropped at once: RFNIB still low for T2
    bit4(ts, tl, 0);
    check(tl >= T2, $sformatf("RFNIB low %0d cycles, at least T2", tl));
    // 2-way: short TYIB pulse
    wait (rfnib); @(negedge clk);
    tyib = 1; repeat (2) @(negedge clk); tyib = 0;
    strobes = cnt;
    w = 0;
    while (!strobe && w < 50) begin @(negedge clk); w++; end
    @(negedge clk);
    check(cnt == strobes + 1 && !rfnib, "2-way pulse taken");
    w = 1;
    while (!rfnib && w < 100) begin @(negedge clk); w++; end
    check(w >= T2, "2-way: RFNIB low at least T2");
    // fill to 8 bits
    while (!full) bit4(ts, tl, 2);
    repeat (3) @(negedge clk);
    check(!rfnib && int_req_b, "full: RFNIB low, REQUEST B");
    repeat (T2 + 5) @(negedge clk);
    tyib = 1; repeat (30) @(negedge clk);
    check(cnt == 8, "no bit taken while full");
    rcv_enable = 0; @(negedge clk);
    check(!int_req_b, "REQUEST B gated by receive enable");
    rcv_enable = 1;
    // read pulse: clear starts at its trailing edge and lasts T3
    @(negedge clk) read_pulse = 1;
    repeat (4) @(negedge clk);
    check(!clear, "no clear during the read pulse");
    read_pulse = 0;
    @(negedge clk);
    w = 0;
    while (clear) begin
      w++;
      check(!strobe && !rfnib, "TYIB ignored during clear");
      @(negedge clk);
    end
    check(w == T3, $sformatf("clear %0d cycles expected T3=%0d", w, T3));
    check(cnt == 0 && !int_req_b, "clear empties the byte");
    // TYIB still high after clear (the IMP waited): RFNIB up, bit taken after T1
    check(rfnib, "RFNIB up after clear");
    w = 0;
    while (!strobe && w < 50) begin @(negedge clk); w++; end
    check(w == T1 + 1, $sformatf("held TYIB taken %0d cycles after clear", w));
    tyib = 0;
    repeat (30) @(negedge clk);
    // last data bit flag stops reception
    ldb_ff = 1; @(negedge clk);
    check(!rfnib && int_req_b, "LDB: RFNIB low, REQUEST B");
    ldb_ff = 0; @(negedge clk);
    // power flag interrupts but does not stop reception
    pwr_ff = 1; @(negedge clk);
    check(int_req_b && rfnib, "power flag: REQUEST B, reception continues");
    pwr_ff = 0;
    rcv_enable = 0; pwr_ff = 1; @(negedge clk);
    check(!int_req_b, "power flag gated by receive enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
