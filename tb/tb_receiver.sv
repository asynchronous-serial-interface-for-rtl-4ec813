// tb_receiver: sends random packets from a model of the IMP's bit sender
// into the receiver and reads them back the way the program would.
//
// The IMP model waits for RFNIB, puts a bit on IMP Data (and LIDB on the
// last bit of a packet), raises TYIB, and in 4-way mode holds it until RFNIB
// falls; in 2-way mode it gives a 3-cycle TYIB pulse and waits for RFNIB to
// fall. The program model waits for REQUEST B, checks INBUF data, bit count
// and last-byte flag, and gives a read pulse. Packets have random lengths in
// bits, so the last byte is often partial; its bits must be right-aligned
// with the count in bits 10:8. Also checked: RFNIB low for at least T2
// cycles per bit, and no RFNIB while the receiver is disabled.
module tb_receiver;
  localparam int unsigned T2 = 10;
  logic clk = 0, rst_n = 0, init = 0, read_pulse = 0, rcv_enable = 0;
  logic tyib_in = 0, data_in = 0, lidb_in = 0, pwr_ff = 0;
  logic rfnib, clear, int_req_b, last_byte, strobe;
  logic [7:0] data;
  logic [2:0] bit_count;
  int checks = 0, failures = 0;

  receiver dut (.*);

  always #50 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // bits to send, filled by the main process; 1 = last of packet
  bit tx_bits[$];
  bit tx_last[$];
  bit four_way = 1;
  int short_low = 0;

  initial begin
    forever begin
      @(negedge clk);
      if (tx_bits.size() > 0 && rfnib) begin
        int lowc;
        data_in = tx_bits.pop_front();
        lidb_in = tx_last.pop_front();
        tyib_in = 1;
        if (four_way) begin
          while (rfnib) @(negedge clk);
        end else begin
          repeat (3) @(negedge clk);
          tyib_in = 0;
          while (rfnib) @(negedge clk);
        end
        tyib_in = 0;
        lowc = 0;
        while (!rfnib && lowc < T2 + 5) begin @(negedge clk); lowc++; end
        // RFNIB may stay low because the byte is full; only a short
        // rise counts as a violation
        if (rfnib && lowc < T2) short_low++;
        data_in = 1'($urandom); lidb_in = 0;
      end
    end
  end

  task automatic read_inbuf();
    @(negedge clk) read_pulse = 1;
    repeat (4) @(negedge clk);
    read_pulse = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    init = 1; repeat (5) @(negedge clk); init = 0;
    repeat (5) @(negedge clk);
    check(!rfnib, "disabled: RFNIB low");
    rcv_enable = 1;
    for (int p = 0; p < 16; p++) begin
      int nbits;
      bit pkt[$];
      four_way = (p % 2 == 0);
      nbits = $urandom_range(1, 40);
      for (int i = 0; i < nbits; i++) begin
        pkt.push_back(1'($urandom));
        tx_bits.push_back(pkt[i]);
        tx_last.push_back(i == nbits - 1);
      end
      for (int i = 0; i < nbits; i += 8) begin
        int k;
        logic [7:0] exp;
        k = (nbits - i >= 8) ? 8 : nbits - i;
        exp = 0;
        for (int j = 0; j < k; j++) exp = {exp[6:0], pkt[i + j]};
        while (!int_req_b) @(negedge clk);
        repeat (3) @(negedge clk);
        check(data == exp, $sformatf("packet %0d byte %0d: %02h expected %02h", p, i / 8, data, exp));
        check(bit_count == 3'(k), $sformatf("bit count %0d expected %0d", bit_count, k % 8));
        check(last_byte == (i + k == nbits), "last byte flag");
        read_inbuf();
      end
    end
    check(short_low == 0, $sformatf("%0d RFNIB lows shorter than T2", short_low));
    rcv_enable = 0; @(negedge clk);
    check(!rfnib, "disabled again: RFNIB low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
