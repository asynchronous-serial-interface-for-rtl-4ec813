// tb_transmitter: sends random bytes through the transmitter to a model of
// the IMP's host-bit receiver and compares what arrives.
//
// The IMP model raises RFNHB, waits for TYHB, samples Host Data and LHDB,
// and lowers RFNHB; in 4-way mode it then waits for TYHB to fall, in 2-way
// mode it only waits a fixed gap. The program model enables the
// transmitter, writes OUTBUF with a 4-cycle load pulse for each byte and
// waits for REQUEST A. Checked: every bit, MSB first; LHDB only with bit 0 of
// a byte that has OUTBUF bit 11 set; exactly 8 bits per load; no TYHB before
// the first load after enable; TYHB low for at least T4 cycles after each
// accepted bit.
module tb_transmitter;
  import if1822_pkg::*;
  localparam int unsigned T4 = 10;
  logic clk = 0, rst_n = 0, init = 0, load_pulse = 0, xmt_enable = 0;
  outbuf_t outbuf;
  logic rfnhb_in = 0;
  logic tyhb, host_data, lhdb, int_req_a, holdoff, advance;
  logic [3:0] bit_count;
  int checks = 0, failures = 0;

  transmitter dut (.*);

  always #50 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // IMP receiver model
  bit four_way = 1;
  bit imp_on = 0;
  logic [7:0] rx_shift;
  int rx_bits = 0;
  int rx_lhdb_pos = -1;
  int short_gaps = 0;
  initial begin
    forever begin
      @(negedge clk);
      if (imp_on) begin
        int gap;
        rfnhb_in = 1;
        while (!tyhb) @(negedge clk);
        repeat (2) @(negedge clk);
        rx_shift = {rx_shift[6:0], host_data};
        if (lhdb) rx_lhdb_pos = rx_bits % 8;
        rx_bits++;
        rfnhb_in = 0;
        gap = 0;
        if (four_way) begin
          while (tyhb) begin @(negedge clk); gap++; end
          repeat ($urandom_range(0, 5)) begin @(negedge clk); gap++; end
        end else begin
          repeat (2) begin @(negedge clk); gap++; end
        end
        rfnhb_in = 1;
        // TYHB must stay low for T4 after the bit was accepted
        while (!tyhb && gap < T4 + 30) begin @(negedge clk); gap++; end
        if (gap < T4) short_gaps++;
      end
    end
  end

  task automatic send(input logic [7:0] b, input bit last);
    int start;
    @(negedge clk);
    outbuf = '0; outbuf.data = b; outbuf.last_byte = last;
    load_pulse = 1;
    repeat (4) @(negedge clk);
    load_pulse = 0;
    start = rx_bits;
    while (!int_req_a) @(negedge clk);
    repeat (20) @(negedge clk);          // RFNHB is up again: must be ignored
    check(rx_bits == start + 8, $sformatf("8 bits per byte, got %0d", rx_bits - start));
    check(rx_shift == b, $sformatf("byte %02h received as %02h", b, rx_shift));
    check(rx_lhdb_pos == (last ? 7 : -1), $sformatf("LHDB position %0d", rx_lhdb_pos));
    check(!tyhb && bit_count == 8, "idle after the byte");
    rx_lhdb_pos = -1;
  endtask

  initial begin
    outbuf = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    init = 1; repeat (5) @(negedge clk); init = 0;
    imp_on = 1;
    repeat (10) @(negedge clk);
    check(!tyhb, "disabled: no TYHB");
    xmt_enable = 1;
    repeat (10) @(negedge clk);
    check(!tyhb && holdoff && rx_bits == 0, "held off until the first load");
    for (int n = 0; n < 24; n++) begin
      four_way = (n % 2 == 0);
      send(8'($urandom), 1'($urandom));
    end
    check(short_gaps == 0, $sformatf("%0d TYHB gaps shorter than T4", short_gaps));
    xmt_enable = 0; @(negedge clk);
    check(!int_req_a, "REQUEST A needs transmit enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
