// tb_host_power_latch: checks the host relay latch against its truth table:
// bit 12 closes, bit 13 opens, neither holds, both closes, INIT opens (and
// wins over bit 12). The expected state is kept by a reference model in the
// testbench and compared after random OUTBUF bit patterns.
module tb_host_power_latch;
  logic clk = 0, rst_n = 0, init = 0, set_closed = 0, clear_open = 0;
  logic relay_closed, host_pwr_off;
  int checks = 0, failures = 0;
  bit model;

  host_power_latch dut (.*);

  always #50 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic apply(input bit i, input bit s, input bit c);
    @(negedge clk);
    init = i; set_closed = s; clear_open = c;
    if (i)      model = 0;
    else if (s) model = 1;
    else if (c) model = 0;
    @(negedge clk);
    check(relay_closed == model && host_pwr_off == !model,
          $sformatf("init=%0b set=%0b clr=%0b: closed=%0b expected %0b", i, s, c, relay_closed, model));
  endtask

  initial begin
    model = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    apply(1, 0, 0);
    check(host_pwr_off == 1, "INIT leaves contacts open");
    apply(0, 1, 0);  // close
    apply(0, 0, 0);  // hold closed
    apply(0, 0, 1);  // open
    apply(0, 0, 0);  // hold open
    apply(0, 1, 1);  // both: closed
    apply(0, 0, 0);  // hold
    apply(1, 1, 0);  // init wins
    repeat (200) apply($urandom_range(0, 7) == 0, 1'($urandom), 1'($urandom));
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
