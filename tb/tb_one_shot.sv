// tb_one_shot: self-checking test of the retriggerable one-shot.
// Checks the pulse width in cycles at the default width (1 us = 10 cycles),
// retriggering during a pulse, and that clear ends a pulse and blocks a
// trigger. Widths are counted by the testbench itself.
module tb_one_shot;
  localparam int unsigned W = 10;
  logic clk = 0, rst_n = 0, clear = 0, trigger = 0, pulse;
  int checks = 0, failures = 0;

  one_shot dut (.clk(clk), .rst_n(rst_n), .clear(clear), .trigger(trigger), .pulse(pulse));

  always #50 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic fire();
    @(negedge clk) trigger = 1;
    @(negedge clk) trigger = 0;
  endtask


  int width;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(pulse == 0, "idle after reset");
    // plain pulse: count cycles high
    fire();
    width = 0;
    while (pulse) begin width++; @(negedge clk); end
    check(width == W, $sformatf("width %0d expected %0d", width, W));
    // retrigger after 4 cycles: total 4 + W
    @(negedge clk) trigger = 1;
    @(negedge clk) trigger = 0;
    repeat (3) @(negedge clk);
    trigger = 1; @(negedge clk); trigger = 0;
    width = 0;
    while (pulse) begin width++; @(negedge clk); end
    check(width == W, $sformatf("retrigger remaining width %0d expected %0d", width, W));
    // clear ends a pulse
    fire();
    repeat (3) @(negedge clk);
    check(pulse == 1, "pulse running before clear");
    clear = 1; @(negedge clk);
    check(pulse == 0, "clear ends pulse");
    trigger = 1; @(negedge clk); trigger = 0;
    check(pulse == 0, "clear blocks trigger");
    clear = 0; @(negedge clk);
    check(pulse == 0, "no late pulse after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
