// transmitter: data section of the card's transmit side.
//
// Sends the low byte of OUTBUF to the IMP one bit at a time, most
// significant bit first, using the 1822 host-bit handshake (RFNHB from the
// IMP, TYHB to the IMP), with Last Host Data Bit marking bit 0 when OUTBUF
// bit 11 is set. Each write of OUTBUF (load pulse) restarts the byte; after
// 8 bits it raises the transmit interrupt request, which reaches the program
// as DRCSR bit 7 (REQUEST A).
//
// It joins xmt_control (handshake, hold-off, T4 one-shot, interrupt) and
// xmt_serializer (bit counter and multiplexer), and synchronises the
// asynchronous RFNHB line with two flip-flops, so TYHB answers an RFNHB edge
// within 3 clock cycles. Host Data and LHDB are stable whenever TYHB is high;
// an assertion checks that rule. OUTBUF, the load pulse, INIT and transmit
// enable are taken as synchronous to `clk` (they come from the DR11-C).
module transmitter
  import if1822_pkg::*;
#(
  parameter int unsigned T4_CYCLES = T_1US_CYCLES
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    init,
  input  logic    load_pulse,
  input  logic    xmt_enable,
  input  outbuf_t outbuf,
  input  logic    rfnhb_in,     // asynchronous, from the line receiver
  output logic    tyhb,
  output logic    host_data,
  output logic    lhdb,
  output logic    int_req_a,
  output logic    holdoff,
  output logic    advance,
  output logic [3:0] bit_count
);
  logic rfnhb;
  logic done;
  logic clr_count;
  logic t4_pulse;

  sync2 #(.RESET_VAL(1'b0)) u_sync_rfnhb (
    .clk(clk), .rst_n(rst_n), .d(rfnhb_in), .q(rfnhb)
  );

  xmt_control #(.T4_CYCLES(T4_CYCLES)) u_ctl (
    .clk        (clk),
    .rst_n      (rst_n),
    .init       (init),
    .load_pulse (load_pulse),
    .xmt_enable (xmt_enable),
    .rfnhb      (rfnhb),
    .done       (done),
    .tyhb       (tyhb),
    .advance    (advance),
    .clr_count  (clr_count),
    .holdoff    (holdoff),
    .t4_pulse   (t4_pulse),
    .int_req_a  (int_req_a)
  );

  xmt_serializer u_ser (
    .clk       (clk),
    .rst_n     (rst_n),
    .clr       (clr_count),
    .advance   (advance),
    .data      (outbuf.data),
    .last_byte (outbuf.last_byte),
    .host_data (host_data),
    .lhdb      (lhdb),
    .count     (bit_count),
    .done      (done)
  );

  // While TYHB stays high the bit on offer must not change.
  property p_data_stable_while_offered;
    @(posedge clk) disable iff (!rst_n)
      (tyhb && $past(tyhb)) |-> ($stable(host_data) && $stable(lhdb));
  endproperty
  assert property (p_data_stable_while_offered)
    else $error("transmitter: data changed while TYHB was high");
endmodule
