// tb_if1822_card: end-to-end test of the 1822 interface card at its default
// parameters, with the DR11-C model on the program side and the loopback
// test plug on the IMP side (Host Data -> IMP Data, LHDB -> LIDB,
// TYHB -> TYIB, RFNIB -> RFNHB, host relay contacts -> IMP relay sense).
//
// A program model plays the diagnostic programs: power-up of the host relay,
// then the scope loop (a two-word packet 000002, 100001 sent as the four
// bytes 000, 002, 200, 001 with LHDB on the last bit, repeated), then the
// packet source/sink program with a 16-word transmit buffer of random
// bytes, then release of the host relay and an INIT. It is interrupt driven
// like the programs (vector A loads the next OUTBUF word, vector B reads
// INBUF) and sometimes services the receiver late so that the transmitter
// must wait for the receiver. Every received INBUF word is checked against
// the word the program sent. Each mechanism of the card is counted and a
// mechanism that never happened counts as a failure.
module tb_if1822_card;
  import if1822_pkg::*;
  logic clk = 0, rst_n = 0;
  // program side of the DR11-C
  logic bus_init = 0, bus_we = 0, bus_re = 0;
  logic [2:0]  bus_addr = 0;
  logic [15:0] bus_wdata = 0, bus_rdata;
  logic irq_a, irq_b;
  // DR11-C <-> card
  logic [15:0] dr_outbuf;
  logic ndr, dt, init, csr0, csr1, req_a, req_b;
  inbuf_t inbuf;
  // IMP side, closed by the loopback plug
  logic tyhb, host_data, lhdb, rfnib, host_relay_closed;
  int checks = 0, failures = 0;

  always #50 clk = ~clk;   // 10 MHz

  dr11c_model u_dr (
    .clk(clk), .rst_n(rst_n),
    .bus_init(bus_init), .bus_we(bus_we), .bus_re(bus_re), .bus_addr(bus_addr),
    .bus_wdata(bus_wdata), .bus_rdata(bus_rdata), .irq_a(irq_a), .irq_b(irq_b),
    .outbuf(dr_outbuf), .new_data_ready(ndr), .data_transmitted(dt), .init(init),
    .csr0(csr0), .csr1(csr1), .inbuf(inbuf), .req_a(req_a), .req_b(req_b)
  );

  if1822_card dut (
    .clk(clk), .rst_n(rst_n),
    .init(init), .outbuf(outbuf_t'(dr_outbuf)), .load_pulse(ndr), .read_pulse(dt),
    .csr0(csr0), .csr1(csr1), .inbuf(inbuf), .req_a(req_a), .req_b(req_b),
    .tyhb(tyhb), .host_data(host_data), .lhdb(lhdb),
    .rfnhb(rfnib), .tyib(tyhb), .imp_data(host_data), .lidb(lhdb),
    .rfnib(rfnib), .host_relay_closed(host_relay_closed),
    .imp_relay_open(!host_relay_closed)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- program-side bus cycles (about 2 us each, like an instruction) ----
  task automatic wr(input logic [2:0] a, input logic [15:0] d);
    @(negedge clk); bus_addr = a; bus_wdata = d; bus_we = 1;
    @(negedge clk); bus_we = 0;
    repeat (20) @(negedge clk);
  endtask

  task automatic rd(input logic [2:0] a, output logic [15:0] d);
    @(negedge clk); bus_addr = a; bus_re = 1; #1 d = bus_rdata;
    @(negedge clk); bus_re = 0;
    repeat (20) @(negedge clk);
  endtask

  // ---- mechanism counters ----
  int n_bits_sent = 0, n_bits_taken = 0, n_holdoff = 0, n_stall = 0;
  int n_clear = 0, n_pwr_pulse = 0, n_lhdb = 0;
  logic stall_q, clear_q, hold_q, pwr_q;
  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_xmt.advance) n_bits_sent <= n_bits_sent + 1;
      if (dut.u_rcv.strobe)  n_bits_taken <= n_bits_taken + 1;
      if (lhdb && dut.u_rcv.strobe) n_lhdb <= n_lhdb + 1;
      // transmitter enabled but held off while the IMP side is ready
      hold_q <= csr0 && dut.u_xmt.holdoff && rfnib;
      if (csr0 && dut.u_xmt.holdoff && rfnib && !hold_q) n_holdoff <= n_holdoff + 1;
      // transmitter has bits to send but the receiver is full
      stall_q <= csr0 && !dut.u_xmt.holdoff && !dut.u_xmt.bit_count[3] && inbuf.bit_count == 0
                 && dut.u_rcv.u_des.full;
      if (!stall_q && csr0 && !dut.u_xmt.holdoff && !dut.u_xmt.bit_count[3]
          && dut.u_rcv.u_des.full) n_stall <= n_stall + 1;
      clear_q <= dut.clear;
      if (dut.clear && !clear_q) n_clear <= n_clear + 1;
      pwr_q <= dut.u_pwr.change_pulse;
      if (dut.u_pwr.change_pulse && !pwr_q) n_pwr_pulse <= n_pwr_pulse + 1;
    end
  end

  // ---- interrupt-driven source/sink program ----
  logic [15:0] xmt_buf[$];     // words the program sends, in order
  logic [15:0] exp_rx[$];      // INBUF words expected
  int n_xmt_int = 0, n_rcv_int = 0, n_last = 0, n_full = 0, n_pwr_int = 0;
  int xi;

  function automatic logic [15:0] expected_inbuf(input logic [15:0] w);
    logic [15:0] e;
    e = {8'h00, w[7:0]};
    if (w[11]) e = e | 16'o104000;   // bits 11 and 15
    return e;
  endfunction

  task automatic service_until_empty(input int words);
    logic [15:0] v, csr;
    int sent = 0, got = 0, guard = 0;
    // start the transmitter: MOV (R5)+,OUTBUF
    wr(3'd2, xmt_buf[0]); exp_rx.push_back(expected_inbuf(xmt_buf[0]));
    sent = 1;
    while (got < words && guard < 400000) begin
      @(negedge clk); guard++;
      if (irq_b) begin
        if ($urandom_range(0, 3) == 0) repeat ($urandom_range(100, 600)) @(negedge clk);
        rd(3'd0, csr);
        check(csr[CSR_RCV_REQ] == 1'b1, "DRCSR bit 15 shows the receive request");
        rd(3'd4, v);
        n_rcv_int++;
        got++;
        if (v[14]) n_pwr_int++;
        if (v[11]) n_last++;
        if (v[10:8] == 0 && !v[15]) n_full++;
        check(exp_rx.size() > 0, "unexpected receive interrupt");
        if (exp_rx.size() > 0) begin
          logic [15:0] e;
          e = exp_rx.pop_front();
          check(v == e, $sformatf("INBUF %06o expected %06o", v, e));
        end
      end else if (irq_a && sent < words) begin
        rd(3'd0, csr);
        check(csr[CSR_XMT_REQ] == 1'b1, "DRCSR bit 7 shows the transmit request");
        n_xmt_int++;
        wr(3'd2, xmt_buf[sent]); exp_rx.push_back(expected_inbuf(xmt_buf[sent]));
        sent++;
      end
    end
    check(got == words, $sformatf("received %0d of %0d words", got, words));
  endtask

  logic [15:0] v;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // RESET instruction: INIT
    @(negedge clk) bus_init = 1; @(negedge clk) bus_init = 0;
    repeat (120) @(negedge clk);
    rd(3'd4, v);
    check(v[13] && v[12], "after INIT host relay open, IMP seen down (loopback)");
    // host relay on (OUTBUF bit 12) with the transmitter still disabled,
    // receiver enabled with interrupts: one power-change interrupt
    wr(3'd0, 16'o000042);
    wr(3'd2, 16'o010000);
    while (!irq_b) @(negedge clk);
    rd(3'd4, v);
    check(v == 16'o140000, $sformatf("power-up INBUF %06o expected 140000", v));
    n_pwr_int++;
    // wait 1 ms for the relay to settle, then enable both directions
    repeat (10000) @(negedge clk);
    wr(3'd0, 16'o000143);
    repeat (50) @(negedge clk);
    check(n_bits_sent == 0, "no bits before the first load after enable");
    // scope loop: 000000 000002 000200 004001, three times round
    xmt_buf = {};
    repeat (3) begin
      xmt_buf.push_back(16'o000000); xmt_buf.push_back(16'o000002);
      xmt_buf.push_back(16'o000200); xmt_buf.push_back(16'o004001);
    end
    service_until_empty(12);
    // packet source/sink: 16-word transmit buffer, random data, bit 11 on some
    repeat (40) @(negedge clk);
    xmt_buf = {};
    for (int i = 0; i < 16; i++)
      xmt_buf.push_back({4'b0, ($urandom_range(0, 3) == 0), 3'b0, 8'($urandom)});
    service_until_empty(16);
    check(n_xmt_int >= 26, $sformatf("%0d transmit interrupts", n_xmt_int));
    // host relay off (OUTBUF bit 13): IMP seen down, one more interrupt
    wr(3'd0, 16'o000042);
    wr(3'd2, 16'o020000);
    while (!irq_b) @(negedge clk);
    rd(3'd4, v);
    check(v == 16'o170000, $sformatf("power-down INBUF %06o expected 170000", v));
    n_pwr_int++;
    // INIT clears everything
    @(negedge clk) bus_init = 1; @(negedge clk) bus_init = 0;
    repeat (150) @(negedge clk);
    rd(3'd0, v);
    check(v == 16'o000000, $sformatf("DRCSR after INIT %06o", v));
    check(!host_relay_closed && !rfnib && !tyhb, "card idle after INIT");

    // mechanisms
    check(n_bits_sent == 8 * 28 && n_bits_taken == 8 * 28,
          $sformatf("bits sent %0d taken %0d, expected %0d", n_bits_sent, n_bits_taken, 8 * 28));
    check(n_holdoff > 0, "hold-off never happened");
    check(n_stall > 0, "transmitter never waited for a full receiver");
    check(n_lhdb >= 3, "last data bit never sent and taken");
    check(n_last >= 3, "last-byte INBUF never seen");
    check(n_full > 0, "full-byte interrupt never seen");
    check(n_pwr_int == 2 && n_pwr_pulse == 2, $sformatf("power changes %0d/%0d", n_pwr_int, n_pwr_pulse));
    check(n_clear >= 30, "clear line never pulsed");
    $display("mechanisms: bits=%0d holdoff=%0d stall=%0d lhdb=%0d last=%0d full=%0d pwr=%0d clear=%0d xmt_int=%0d rcv_int=%0d",
             n_bits_sent, n_holdoff, n_stall, n_lhdb, n_last, n_full, n_pwr_int, n_clear, n_xmt_int, n_rcv_int);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
