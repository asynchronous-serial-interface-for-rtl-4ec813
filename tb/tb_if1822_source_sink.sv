// tb_if1822_source_sink: the card at default parameters against a model of
// the IMP instead of the loopback plug, in the two one-way modes of the
// packet source/sink program: transmit only (DRCSR 101 octal) and receive
// only (DRCSR 042 octal).
//
// Transmit only: the program sends a 16-word buffer of random bytes, with
// OUTBUF bit 11 on some words, one word per transmit interrupt. The IMP
// model takes the host bits with the 2-way handshake (a short RFNHB pulse
// per bit) and checks every bit and every LHDB.
// Receive only: the IMP model sends packets of random bit lengths with the
// 2-way handshake (a 3-cycle TYIB pulse per bit) and LIDB on the last bit;
// the program fills a 16-word circular buffer from INBUF on each receive
// interrupt, and each word is checked, including partial last bytes
// (right-aligned data, bit count in bits 10:8, bits 11 and 15 set).
// Also checked: the IMP relay level in INBUF bit 12 with the IMP up.
module tb_if1822_source_sink;
  import if1822_pkg::*;
  logic clk = 0, rst_n = 0;
  logic bus_init = 0, bus_we = 0, bus_re = 0;
  logic [2:0]  bus_addr = 0;
  logic [15:0] bus_wdata = 0, bus_rdata;
  logic irq_a, irq_b;
  logic [15:0] dr_outbuf;
  logic ndr, dt, init, csr0, csr1, req_a, req_b;
  inbuf_t inbuf;
  logic tyhb, host_data, lhdb, rfnib, host_relay_closed;
  logic rfnhb = 0, tyib = 0, imp_data = 0, lidb = 0, imp_relay_open = 0;
  int checks = 0, failures = 0;

  always #50 clk = ~clk;

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
    .rfnhb(rfnhb), .tyib(tyib), .imp_data(imp_data), .lidb(lidb),
    .rfnib(rfnib), .host_relay_closed(host_relay_closed),
    .imp_relay_open(imp_relay_open)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

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

  // ---- IMP model: host-bit sink, 2-way handshake ----
  bit sink_on = 0;
  bit host_bits[$];
  bit host_lhdb[$];
  initial begin
    forever begin
      @(negedge clk);
      if (sink_on) begin
        rfnhb = 1;
        while (!tyhb && sink_on) @(negedge clk);
        if (tyhb) begin
          repeat (2) @(negedge clk);
          host_bits.push_back(host_data);
          host_lhdb.push_back(lhdb);
          rfnhb = 0;                       // end of the ready pulse
          repeat (4) @(negedge clk);
        end
      end else rfnhb = 0;
    end
  end

  // ---- IMP model: IMP-bit source, 2-way handshake ----
  bit src_bits[$];
  bit src_last[$];
  initial begin
    forever begin
      @(negedge clk);
      if (src_bits.size() > 0 && rfnib) begin
        imp_data = src_bits.pop_front();
        lidb = src_last.pop_front();
        tyib = 1;
        repeat (3) @(negedge clk);
        tyib = 0;                          // end of the bit pulse
        while (rfnib) @(negedge clk);      // card took the bit
        repeat (2) @(negedge clk);
        imp_data = 1'($urandom); lidb = 0;
      end
    end
  end

  logic [15:0] v, xbuf[16], rbuf[16];
  logic [15:0] exp_rx[$];
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) bus_init = 1; @(negedge clk) bus_init = 0;
    repeat (150) @(negedge clk);
    rd(3'd4, v);
    check(v[12] == 1'b0 && v[13] == 1'b1, "IMP up, host relay open");

    // ---------------- transmit only (101) ----------------
    for (int i = 0; i < 16; i++) xbuf[i] = {4'b0, ($urandom_range(0, 2) == 0), 3'b0, 8'($urandom)};
    sink_on = 1;
    wr(3'd0, 16'o000101);
    wr(3'd2, xbuf[0]);
    for (int i = 1; i <= 16; i++) begin
      int guard = 0;
      while (!irq_a && guard < 20000) begin @(negedge clk); guard++; end
      check(irq_a, $sformatf("transmit interrupt %0d", i));
      check(!irq_b && !rfnib, "receiver idle in transmit-only mode");
      if (i < 16) wr(3'd2, xbuf[i]);
    end
    sink_on = 0;
    check(host_bits.size() == 128, $sformatf("%0d host bits, expected 128", host_bits.size()));
    for (int i = 0; i < 16 && host_bits.size() >= 8; i++) begin
      logic [7:0] b;
      int lpos;
      b = 0; lpos = -1;
      for (int k = 0; k < 8; k++) begin
        b = {b[6:0], host_bits.pop_front()};
        if (host_lhdb.pop_front()) lpos = k;
      end
      check(b == xbuf[i][7:0], $sformatf("word %0d: byte %03o expected %03o", i, b, xbuf[i][7:0]));
      check(lpos == (xbuf[i][11] ? 7 : -1), $sformatf("word %0d: LHDB at %0d", i, lpos));
    end

    // ---------------- receive only (042) ----------------
    wr(3'd0, 16'o000042);
    for (int p = 0; p < 6; p++) begin
      int nbits;
      bit pkt[$];
      nbits = (p == 0) ? 24 : $urandom_range(1, 30);
      pkt = {};
      for (int i = 0; i < nbits; i++) begin
        pkt.push_back(1'($urandom));
        src_bits.push_back(pkt[i]);
        src_last.push_back(i == nbits - 1);
      end
      for (int i = 0; i < nbits; i += 8) begin
        int k;
        logic [15:0] e;
        k = (nbits - i >= 8) ? 8 : nbits - i;
        e = 0;
        for (int j = 0; j < k; j++) e[7:0] = {e[6:0], pkt[i + j]};
        e[10:8] = 3'(k);
        e[13] = 1'b1;                      // host relay left open
        if (i + k == nbits) e = e | 16'o104000;
        exp_rx.push_back(e);
      end
    end
    for (int n = 0; exp_rx.size() > 0; n++) begin
      int guard = 0;
      logic [15:0] e;
      while (!irq_b && guard < 20000) begin @(negedge clk); guard++; end
      check(irq_b, "receive interrupt");
      rd(3'd4, v);
      rbuf[n % 16] = v;                    // circular 16-word buffer
      e = exp_rx.pop_front();
      check(v == e, $sformatf("INBUF %06o expected %06o", v, e));
      check(!irq_a && !tyhb, "transmitter idle in receive-only mode");
    end
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
