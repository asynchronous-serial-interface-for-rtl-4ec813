// tb_xmt_serializer: checks the bit counter and multiplexer. For random
// bytes it steps the counter with `advance` and compares Host Data with the
// expected bit (bit 7 first), LHDB with "last byte and count 7", and checks
// that the counter stops at 8 and that `clr` returns it to 0.
module tb_xmt_serializer;
  logic clk = 0, rst_n = 0, clr = 0, advance = 0, last_byte = 0;
  logic [7:0] data = 0;
  logic host_data, lhdb, done;
  logic [3:0] count;
  int checks = 0, failures = 0;

  xmt_serializer dut (.*);

  always #50 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      data = 8'($urandom); last_byte = 1'($urandom);
      clr = 1; @(negedge clk); clr = 0;
      check(count == 0 && !done, "cleared");
      for (int b = 0; b < 8; b++) begin
        check(host_data == data[7-b], $sformatf("byte %02h bit %0d", data, b));
        check(lhdb == (last_byte && b == 7), $sformatf("lhdb at bit %0d", b));
        advance = 1; @(negedge clk); advance = 0;
        // idle cycles in between must not move the counter
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      check(done && count == 8, "done after 8 advances");
      check(!lhdb, "lhdb drops after the last bit");
      advance = 1; @(negedge clk); advance = 0;
      check(count == 8, "counter stops at 8");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
