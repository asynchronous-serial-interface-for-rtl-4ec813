// tb_rcv_deserializer: checks the receive shift register, bit counter and
// Last Data Bit flip-flop. Random bits are strobed in; the testbench keeps
// its own copy of the expected register (first bit ends in bit 7), count and
// flag, and checks `clear`.
module tb_rcv_deserializer;
  logic clk = 0, rst_n = 0, clear = 0, strobe = 0, serial_in = 0, lidb = 0;
  logic [7:0] data;
  logic [3:0] count;
  logic full, ldb_ff;
  logic [7:0] exp_data;
  int exp_count;
  bit exp_ldb;
  int checks = 0, failures = 0;

  rcv_deserializer dut (.*);

  always #50 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      int nbits;
      @(negedge clk) clear = 1; @(negedge clk) clear = 0;
      exp_data = 0; exp_count = 0; exp_ldb = 0;
      check(data == 0 && count == 0 && !ldb_ff && !full, "clear empties");
      nbits = $urandom_range(1, 8);
      for (int b = 0; b < nbits; b++) begin
        serial_in = 1'($urandom);
        lidb = (b == nbits - 1) && (nbits < 8 || 1'($urandom));
        strobe = 1; @(negedge clk); strobe = 0;
        exp_data = {exp_data[6:0], serial_in}; exp_count++; exp_ldb = lidb;
        serial_in = 1'($urandom); lidb = 1'($urandom);   // lines move between strobes
        repeat ($urandom_range(0, 3)) @(negedge clk);
        check(data == exp_data, $sformatf("data %02h expected %02h", data, exp_data));
        check(count == 4'(exp_count) && full == (exp_count == 8), "count");
        check(ldb_ff == exp_ldb, "last data bit flag");
      end
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
