// tb_xmt_control: checks the transmit handshake controller with RFNHB driven
// directly (already synchronous). A small counter in the testbench stands in
// for the bit counter. Checked: hold-off until the first load pulse after
// enable, TYHB only while RFNHB is high, one `advance` per accepted bit,
// TYHB low for at least T4 cycles after each bit, no handshake and REQUEST A
// after 8 bits, REQUEST A gated by transmit enable, load and INIT clearing.
module tb_xmt_control;
  localparam int unsigned T4 = 10;
  logic clk = 0, rst_n = 0, init = 0, load_pulse = 0, xmt_enable = 0, rfnhb = 0;
  logic done, tyhb, advance, clr_count, holdoff, t4_pulse, int_req_a;
  logic [3:0] cnt;
  int checks = 0, failures = 0;
  int adv_seen;

  xmt_control dut (.*);

  always #50 clk = ~clk;

  // stand-in for the bit counter
  always_ff @(posedge clk) begin
    if (!rst_n || clr_count) cnt <= 0;
    else if (advance && !cnt[3]) cnt <= cnt + 1;
  end
  assign done = cnt[3];

  always_ff @(posedge clk) if (advance) adv_seen <= adv_seen + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load();
    @(negedge clk) load_pulse = 1;
    repeat (3) begin
      @(negedge clk);
      check(!tyhb, "TYHB low during load pulse");
    end
    load_pulse = 0;
  endtask

  int lowc;
  initial begin
    adv_seen = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    init = 1; repeat (5) @(negedge clk); init = 0;
    rfnhb = 1;
    repeat (5) @(negedge clk);
    check(!tyhb && holdoff, "disabled: no TYHB");
    xmt_enable = 1;
    repeat (5) @(negedge clk);
    check(!tyhb && holdoff, "enabled but held off until load");
    // RFNHB edges while held off must not count
    rfnhb = 0; repeat (3) @(negedge clk); rfnhb = 1; repeat (3) @(negedge clk);
    check(adv_seen == 0, "no advance while held off");
    load();
    @(negedge clk);
    check(!holdoff && tyhb, "TYHB after load with RFNHB high");
    for (int b = 0; b < 8; b++) begin
      int n_before;
      n_before = adv_seen;
      wait (tyhb); @(negedge clk);
      rfnhb = 0;                                   // accept
      @(negedge clk);
      check(adv_seen == n_before + 1, $sformatf("one advance for bit %0d", b));
      check(!tyhb, "TYHB low after accept");
      repeat ($urandom_range(0, 15)) @(negedge clk);
      rfnhb = 1;
      lowc = 0;
      while (!tyhb && lowc < 40 && !done) begin @(negedge clk); lowc++; end
      if (!done) check(t4_pulse == 0, "TYHB returns only after T4");
    end
    repeat (3) @(negedge clk);
    check(done && int_req_a, "REQUEST A after 8 bits");
    check(!tyhb, "no TYHB after 8 bits (RFNHB ignored)");
    rfnhb = 0; repeat (3) @(negedge clk); rfnhb = 1; repeat (3) @(negedge clk);
    check(adv_seen == 8, "exactly 8 advances");
    xmt_enable = 0; @(negedge clk);
    check(!int_req_a, "REQUEST A gated by transmit enable");
    xmt_enable = 1; repeat (2) @(negedge clk);
    check(holdoff && !tyhb, "re-enable sets hold-off");
    load();
    @(negedge clk);
    check(!int_req_a && cnt == 0 && tyhb, "load clears the request and restarts");
    // TYHB low time: accept, raise RFNHB at once, count low cycles
    rfnhb = 0; @(negedge clk); rfnhb = 1;
    lowc = 1;
    while (!tyhb && lowc < 50) begin @(negedge clk); lowc++; end
    check(lowc >= T4, $sformatf("TYHB low %0d cycles, at least T4=%0d", lowc, T4));
    init = 1; @(negedge clk); init = 0; @(negedge clk);
    check(cnt == 0 && holdoff, "INIT clears");
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
